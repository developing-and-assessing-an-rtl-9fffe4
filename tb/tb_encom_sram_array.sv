// tb_encom_sram_array: writes random bits at random rows and columns of the
// 16 x 32 array, following each '1' with a dual write on the segment's
// Zero-Switch row, and checks the read bit lines of whole rows and the
// power state of all 64 groups against a reference array.
module tb_encom_sram_array;
  import encom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0]               wl;
  logic [SEGMENTS-1:0]           zs_wl;
  logic [COLS-1:0]               col_set, col_clr, col_rd;
  logic [SEGMENTS-1:0][COLS-1:0] group_on;
  logic [ROWS-1:0][COLS-1:0]     ref_mem;
  logic [SEGMENTS-1:0][COLS-1:0] ref_on;
  int checks = 0, failures = 0;

  encom_sram_array dut (.clk, .rst_n, .wl, .zs_wl, .col_set, .col_clr, .col_rd, .group_on);

  always #5 clk = ~clk;

  task automatic idle();
    wl = '0; zs_wl = '0; col_set = '0; col_clr = '0;
  endtask

  // Write a random subset of columns of one row.
  task automatic write_row(input int row);
    logic [COLS-1:0] mask, data;
    mask = $urandom; data = $urandom & $urandom & $urandom;   // mostly zeros
    @(negedge clk);
    idle(); wl[row] = 1'b1; col_set = mask & data; col_clr = mask & ~data;
    @(posedge clk);
    ref_mem[row] = (ref_mem[row] & ~mask) | (mask & data);
    if (|(mask & data)) begin
      @(negedge clk);
      idle(); zs_wl[row / GROUP_SIZE] = 1'b1; col_set = mask & data;
      @(posedge clk);
      ref_on[row / GROUP_SIZE] |= mask & data;
    end
    @(negedge clk);
    idle();
  endtask

  task automatic read_row(input int row);
    @(negedge clk);
    idle(); wl[row] = 1'b1;
    #1;
    checks++;
    if (col_rd !== ref_mem[row]) begin
      failures++; $display("FAIL row %0d read %h exp %h", row, col_rd, ref_mem[row]);
    end
    checks++;
    if (group_on !== ref_on) begin failures++; $display("FAIL group_on %h exp %h", group_on, ref_on); end
  endtask

  initial begin
    idle(); ref_mem = '0; ref_on = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) read_row(r);
    for (int n = 0; n < 600; n++) begin
      int r;
      r = $urandom_range(0, ROWS - 1);
      if ($urandom_range(0, 1) == 0) write_row(r);
      else read_row(r);
    end
    for (int r = 0; r < ROWS; r++) read_row(r);
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
