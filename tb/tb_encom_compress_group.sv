// tb_encom_compress_group: drives one compress group the way the array does
// (a write cycle on one word line, then a dual-write cycle on the
// Zero-Switch word line when a '1' was written) and checks every read
// against a reference of eight bits and a power flag. It also checks that
// the group starts gated, that a '1' powers it on only after the dual write,
// and that a gated group reads '0' on every row.
module tb_encom_compress_group;
  import encom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [GROUP_SIZE-1:0] wl;
  logic zs_wl, set, clr, rd, pwr_on;
  logic [GROUP_SIZE-1:0] ref_bits;
  logic ref_on;
  int checks = 0, failures = 0, gated_reads = 0, power_ups = 0;

  encom_compress_group dut (.clk, .rst_n, .wl, .zs_wl, .set, .clr, .rd, .pwr_on);

  always #5 clk = ~clk;

  task automatic idle();
    wl = '0; zs_wl = 0; set = 0; clr = 0;
  endtask

  task automatic write_bit(input int row, input logic b);
    @(negedge clk);
    idle(); wl[row] = 1'b1; set = b; clr = ~b;
    @(posedge clk);
    ref_bits[row] = b;
    if (b) begin   // dual write to the Zero-Switch Cell
      @(negedge clk);
      idle(); zs_wl = 1'b1; set = 1'b1;
      checks++;
      if (pwr_on !== ref_on) begin failures++; $display("FAIL power before dual write"); end
      @(posedge clk);
      if (!ref_on) power_ups++;
      ref_on = 1'b1;
    end
    @(negedge clk);
    idle();
  endtask

  task automatic read_bit(input int row);
    @(negedge clk);
    idle(); wl[row] = 1'b1;
    #1;
    checks++;
    if (rd !== (ref_on & ref_bits[row])) begin
      failures++; $display("FAIL read row %0d: %b exp %b", row, rd, ref_on & ref_bits[row]);
    end
    if (!ref_on) gated_reads++;
    checks++;
    if (pwr_on !== ref_on) begin failures++; $display("FAIL pwr_on %b exp %b", pwr_on, ref_on); end
    @(negedge clk);
    idle();
  endtask

  initial begin
    idle(); ref_bits = '0; ref_on = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < GROUP_SIZE; r++) read_bit(r);
    for (int r = 0; r < GROUP_SIZE; r++) write_bit(r, 1'b0);
    checks++;
    if (pwr_on !== 1'b0) begin failures++; $display("FAIL zeros powered the group"); end
    for (int n = 0; n < 300; n++) begin
      int r;
      r = $urandom_range(0, GROUP_SIZE - 1);
      if ($urandom_range(0, 2) == 0) write_bit(r, ($urandom_range(0, 5) == 0));
      else read_bit(r);
    end
    checks++;
    if (gated_reads == 0 || power_ups != 1) begin
      failures++; $display("FAIL coverage gated_reads=%0d power_ups=%0d", gated_reads, power_ups);
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
