// encom_write_driver: byte write circuit with dual-write support.
//
// Each data bit has two drivers, one on the bit line (writes '1') and one
// on the bit line bar (writes '0'). During the first write cycle (`we`) the
// byte is written as usual. During the second cycle of a dual write (`dwp`,
// the dual write pulse) only the bit-line driver of each bit that is '1' is
// active: the bit-line driver is the AND of the data bit with the write
// enable or the pulse, and the bit line bar stays idle so that no Zero-Switch Cell is
// written with '0'. That the second write happens only for bits that are
// '1', gated by the pulse on the bit-line side, follows the published
// circuit; keeping the bit line bar idle in the second cycle and the exact
// gating are this design's choice.
// Purely combinational.
module encom_write_driver
  import encom_pkg::*;
(
  input  logic [BYTE_W-1:0] data,  // byte to be written
  input  logic              we,    // first write cycle
  input  logic              dwp,   // dual write pulse: second write cycle
  output logic [BYTE_W-1:0] set,   // drive bit line: write '1'
  output logic [BYTE_W-1:0] clr    // drive bit line bar: write '0'
);

  assign set = data & {BYTE_W{we | dwp}};
  assign clr = ~data & {BYTE_W{we & ~dwp}};

endmodule
