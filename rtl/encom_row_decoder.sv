// encom_row_decoder: 4:16 word-line decoder with the En-Com extension that
// selects a Zero-Switch Cell word line.
//
// When `en` is high exactly one of the 16 word lines, the one named by
// `row_addr`, is raised; otherwise all are low. Two further word lines reach
// the rows of Zero-Switch Cells: the top one serves rows 0-7, the bottom one
// rows 8-15. Which of the two is chosen is taken from the most significant
// row-address bit alone, gated by the dual write pulse `pg`, so a Zero-Switch
// word line can rise only while the pulse is active. The 4:16 size and the
// use of the address MSB, one inverter and two AND gates follow the
// published decoder; that rows 0-7 belong to the top cell row is this
// design's reading of the word-line order. Purely combinational.
module encom_row_decoder
  import encom_pkg::*;
(
  input  logic [ROW_AW-1:0]   row_addr,  // row address, MSB selects the segment
  input  logic                en,        // raise the addressed word line
  input  logic                pg,        // dual write pulse
  output logic [ROWS-1:0]     wl,        // word lines 0..15
  output logic [SEGMENTS-1:0] zs_wl      // [0]: top Zero-Switch row, [1]: bottom
);

  always_comb begin
    wl = '0;
    if (en) wl[row_addr] = 1'b1;
  end

  // One NOT gate and two AND gates on the address MSB.
  assign zs_wl[0] = ~row_addr[ROW_AW-1] & pg;
  assign zs_wl[1] =  row_addr[ROW_AW-1] & pg;

endmodule
