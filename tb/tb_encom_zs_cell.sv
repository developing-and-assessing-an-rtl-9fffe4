// tb_encom_zs_cell: the Zero-Switch Cell starts at '0' (group gated), is set
// and cleared through its word line, and drives enable_zero as the inverse
// of its stored bit.
module tb_encom_zs_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wl, set, clr, enable_zero, state;
  logic ref_q;
  int checks = 0, failures = 0;

  encom_zs_cell dut (.clk, .rst_n, .wl, .set, .clr, .enable_zero, .state);

  always #5 clk = ~clk;

  initial begin
    wl = 0; set = 0; clr = 0; ref_q = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (state !== 1'b0 || enable_zero !== 1'b1) begin
      failures++; $display("FAIL reset: state=%b enable_zero=%b", state, enable_zero);
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wl = $urandom_range(0, 1);
      set = $urandom_range(0, 1); clr = ~set & $urandom_range(0, 1);
      @(posedge clk);
      if (wl && set) ref_q = 1'b1;
      else if (wl && clr) ref_q = 1'b0;
      #1;
      checks++;
      if (state !== ref_q || enable_zero !== ~ref_q) begin
        failures++; $display("FAIL state=%b enable_zero=%b exp %b", state, enable_zero, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
