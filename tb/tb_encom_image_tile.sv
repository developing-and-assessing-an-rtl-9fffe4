// tb_encom_image_tile: stores an image tile in the subarray and measures how
// much of it stays power gated.
//
// The tile is 16 lines of 4 eight-bit pixels, one line per row, generated
// as a smooth gradient with noise whose most and least significant bits are
// often zero, the way neighbouring pixels of natural images are. After the
// tile is written into a freshly reset array, a compress group must be
// powered exactly when one of its eight cells (same bit position, same
// pixel column, eight consecutive lines) holds a '1'. The test checks the
// count of gated groups against that count computed from the tile, checks
// the write cost (one cycle plus one per pixel that holds a '1'), and reads
// the tile back.
module tb_encom_image_tile;
  import encom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                          req_valid, req_ready, req_we;
  logic [ADDR_W-1:0]             req_addr;
  logic [BYTE_W-1:0]             req_wdata;
  logic                          rsp_valid;
  logic [BYTE_W-1:0]             rsp_rdata;
  logic [SEGMENTS-1:0][COLS-1:0] group_on;
  logic                          dual_write, sense_isolate;

  encom_sram dut (.clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
                  .rsp_valid, .rsp_rdata, .group_on, .dual_write, .sense_isolate);

  always #5 clk = ~clk;

  logic [BYTE_W-1:0] tile [ROWS][COL_SEL];
  int checks = 0, failures = 0;
  longint cycles = 0;

  initial begin
    int exp_on, exp_cycles, ones_pixels;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COL_SEL; c++) begin
        int v;
        v = 8 * r + 4 * c + int'($urandom_range(0, 6));   // gradient plus noise
        tile[r][c] = BYTE_W'(v) & 8'h7E;                    // MSB and LSB zero
      end
    // Expected powered groups and write cost, from the tile alone.
    exp_on = 0; ones_pixels = 0;
    for (int s = 0; s < SEGMENTS; s++)
      for (int c = 0; c < COL_SEL; c++)
        for (int b = 0; b < BYTE_W; b++) begin
          logic any;
          any = 1'b0;
          for (int r = 0; r < GROUP_SIZE; r++) any |= tile[s*GROUP_SIZE + r][c][b];
          if (any) exp_on++;
        end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COL_SEL; c++) if (tile[r][c] != 0) ones_pixels++;
    exp_cycles = ROWS * COL_SEL + ones_pixels;

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    // Back-to-back writes of the whole tile.
    req_valid = 1'b1; req_we = 1'b1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COL_SEL; c++) begin
        req_addr = ADDR_W'(r * COL_SEL + c); req_wdata = tile[r][c];
        do begin @(posedge clk); cycles++; end while (!req_ready);
        #1;
      end
    req_valid = 1'b0;
    @(posedge clk); cycles++;     // last array cycle
    if (tile[ROWS-1][COL_SEL-1] != 0) begin @(posedge clk); cycles++; end   // its dual write
    #1;
    cycles--;     // the first edge only accepts the first request
    checks++;
    if (cycles != longint'(exp_cycles)) begin
      failures++; $display("FAIL write cost %0d cycles, expected %0d", cycles, exp_cycles);
    end
    checks++;
    if ($countones(group_on) != exp_on) begin
      failures++; $display("FAIL powered groups %0d, expected %0d", $countones(group_on), exp_on);
    end
    $display("tile: %0d of %0d compress groups gated, %0d write cycles for %0d bytes",
             ROWS / GROUP_SIZE * COLS - exp_on, ROWS / GROUP_SIZE * COLS, cycles, ROWS * COL_SEL);
    // Read back.
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COL_SEL; c++) begin
        @(negedge clk);
        req_valid = 1'b1; req_we = 1'b0; req_addr = ADDR_W'(r * COL_SEL + c);
        @(posedge clk); #1 req_valid = 1'b0;
        @(posedge clk); #1;
        checks++;
        if (!rsp_valid || rsp_rdata !== tile[r][c]) begin
          failures++; $display("FAIL read line %0d pixel %0d: %h exp %h", r, c, rsp_rdata, tile[r][c]);
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
