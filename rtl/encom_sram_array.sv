// encom_sram_array: the 16 x 32 En-Com cell array.
//
// The array is cut into two segments of eight rows (top: rows 0-7, bottom:
// rows 8-15). In each segment every one of the 32 columns is a compress
// group with its own Zero-Switch Cell, giving 64 groups. Word lines select a
// row for reading or writing; the two Zero-Switch word lines select the
// Zero-Switch row of a segment during the dual-write cycle. `col_set` and
// `col_clr` are the per-column bit-line drivers after the column
// multiplexer; `col_rd` is the value on each column's read bit line.
// Writes take effect on the rising clock edge, reads are combinational.
// Array size and segmentation are the published configuration.
module encom_sram_array
  import encom_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [ROWS-1:0]                wl,       // row word lines
  input  logic [SEGMENTS-1:0]            zs_wl,    // Zero-Switch word lines
  input  logic [COLS-1:0]                col_set,  // drive bit line: write '1'
  input  logic [COLS-1:0]                col_clr,  // drive bit line bar: write '0'
  output logic [COLS-1:0]                col_rd,   // read bit lines
  output logic [SEGMENTS-1:0][COLS-1:0]  group_on  // power state of each group
);

  logic [SEGMENTS-1:0][COLS-1:0] seg_rd;

  for (genvar s = 0; s < SEGMENTS; s++) begin : g_seg
    for (genvar c = 0; c < COLS; c++) begin : g_col
      encom_compress_group u_group (
        .clk    (clk),
        .rst_n  (rst_n),
        .wl     (wl[s*GROUP_SIZE +: GROUP_SIZE]),
        .zs_wl  (zs_wl[s]),
        .set    (col_set[c]),
        .clr    (col_clr[c]),
        .rd     (seg_rd[s][c]),
        .pwr_on (group_on[s][c])
      );
    end
  end

  // The segments share the column bit lines.
  always_comb begin
    col_rd = '0;
    for (int s = 0; s < SEGMENTS; s++) col_rd |= seg_rd[s];
  end

endmodule
