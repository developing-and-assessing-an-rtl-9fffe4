// tb_encom_dwpg: issues random back-to-back reads and writes to the access
// sequencer and checks, cycle by cycle, the state sequence, the control
// outputs and the ready signal against a reference: one cycle per access,
// and one extra pulse cycle after a write whose byte holds a '1'.
module tb_encom_dwpg;
  import encom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, start_we, start_has_one;
  logic ready, row_en, col_en, we, dwp, sense, sa_iso;
  seq_state_e state, ref_state;
  logic ref_one;
  int checks = 0, failures = 0, duals = 0, reads = 0;

  encom_dwpg dut (.clk, .rst_n, .start, .start_we, .start_has_one, .ready, .state,
                  .row_en, .col_en, .we, .dwp, .sense, .sa_iso);

  always #5 clk = ~clk;

  initial begin
    start = 0; start_we = 0; start_has_one = 0;
    ref_state = SEQ_IDLE; ref_one = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check outputs of the current state
      checks++;
      if (state !== ref_state
          || ready  !== !(ref_state == SEQ_WRITE && ref_one)
          || row_en !== (ref_state == SEQ_READ || ref_state == SEQ_WRITE)
          || col_en !== (ref_state != SEQ_IDLE)
          || we     !== (ref_state == SEQ_WRITE)
          || dwp    !== (ref_state == SEQ_DUAL)
          || sense  !== (ref_state == SEQ_READ)
          || sa_iso !== (ref_state == SEQ_WRITE || ref_state == SEQ_DUAL)) begin
        failures++;
        $display("FAIL n=%0d state=%0d exp %0d ready=%b dwp=%b", n, state, ref_state, ready, dwp);
      end
      if (ref_state == SEQ_DUAL) duals++;
      if (ref_state == SEQ_READ) reads++;
      start = ready & ($urandom_range(0, 3) != 0);
      start_we = $urandom_range(0, 1); start_has_one = $urandom_range(0, 1);
      @(posedge clk);
      if (start) begin
        ref_state = start_we ? SEQ_WRITE : SEQ_READ;
        ref_one   = start_we & start_has_one;
      end else if (ref_state == SEQ_WRITE && ref_one) ref_state = SEQ_DUAL;
      else ref_state = SEQ_IDLE;
    end
    checks++;
    if (duals == 0 || reads == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
