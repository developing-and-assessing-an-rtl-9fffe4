// encom_col_decoder: 2:4 column decoder.
//
// Raises one of four column-select lines, the one named by `col_addr`, while
// `en` is high. Each select line steers the column multiplexer so that every
// data bit of the byte is connected to one of its four bit-line pairs. The
// 2:4 size is the published one; the enable input is this design's choice.
// Purely combinational.
module encom_col_decoder
  import encom_pkg::*;
(
  input  logic [COL_AW-1:0]  col_addr,  // byte position within the row
  input  logic               en,        // access in progress
  output logic [COL_SEL-1:0] col_sel    // one-hot column select
);

  always_comb begin
    col_sel = '0;
    if (en) col_sel[col_addr] = 1'b1;
  end

endmodule
