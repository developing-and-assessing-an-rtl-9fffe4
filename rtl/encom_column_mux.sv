// encom_column_mux: 4:1 column multiplexer between the 32 bit-line pairs and
// the 8 data bits of a byte.
//
// Data bit i is served by the four adjacent columns 4*i .. 4*i+3; the
// one-hot `col_sel` from the 2:4 column decoder chooses which of them is
// connected. In the write direction the bit's drivers (`set`, `clr`) are
// steered onto the chosen column; in the read direction the chosen column's
// bit line is passed to the data bit. Four bit-line pairs per multiplexer
// output is the published structure; the exact column order of the bits is
// this design's choice. Purely combinational.
module encom_column_mux
  import encom_pkg::*;
(
  input  logic [COL_SEL-1:0] col_sel,  // one-hot column select
  input  logic [BYTE_W-1:0]  set,      // write '1' on data bit i
  input  logic [BYTE_W-1:0]  clr,      // write '0' on data bit i
  output logic [COLS-1:0]    col_set,  // per-column bit-line drivers
  output logic [COLS-1:0]    col_clr,
  input  logic [COLS-1:0]    col_rd,   // per-column read bit lines
  output logic [BYTE_W-1:0]  rd        // sensed byte
);

  always_comb begin
    col_set = '0;
    col_clr = '0;
    rd      = '0;
    for (int i = 0; i < BYTE_W; i++) begin
      for (int k = 0; k < COL_SEL; k++) begin
        col_set[i*COL_SEL + k] = set[i] & col_sel[k];
        col_clr[i*COL_SEL + k] = clr[i] & col_sel[k];
        rd[i] |= col_rd[i*COL_SEL + k] & col_sel[k];
      end
    end
  end

endmodule
