// tb_encom_cell_7t: random writes, reads and power gating of one 7T cell,
// compared with a one-bit reference: the cell reads its bit only while its
// word line is high and the group is powered, and reads '0' otherwise.
module tb_encom_cell_7t;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wl, set, clr, pwr_on, rd, state;
  logic ref_q;
  int checks = 0, failures = 0;

  encom_cell_7t dut (.clk, .rst_n, .wl, .set, .clr, .pwr_on, .rd, .state);

  always #5 clk = ~clk;

  initial begin
    wl = 0; set = 0; clr = 0; pwr_on = 0; ref_q = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (state !== 1'b0) begin failures++; $display("FAIL reset value"); end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wl = $urandom_range(0, 1); pwr_on = $urandom_range(0, 1);
      set = $urandom_range(0, 1); clr = ~set & $urandom_range(0, 1);
      #1;
      checks++;
      if (rd !== (wl & pwr_on & ref_q)) begin
        failures++; $display("FAIL rd wl=%b pwr=%b ref=%b rd=%b", wl, pwr_on, ref_q, rd);
      end
      @(posedge clk);
      if (wl && set) ref_q = 1'b1;
      else if (wl && clr) ref_q = 1'b0;
      #1;
      checks++;
      if (state !== ref_q) begin failures++; $display("FAIL state %b exp %b", state, ref_q); end
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
