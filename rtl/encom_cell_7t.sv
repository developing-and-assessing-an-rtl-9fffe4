// encom_cell_7t: logical model of the 7-transistor storage cell of a
// compress group.
//
// The cell is a 6T latch plus one extra transistor that pulls the storage
// node to logic '0' while the group's power gate is off, so a gated cell
// never floats and reads back as a clean '0' through the unchanged read
// path. In this model the latch is a flip-flop written on the clock edge
// when its word line `wl` is high and one side of its bit-line pair is
// driven (`set` writes '1', `clr` writes '0'). `rd` is the cell's pull on the
// read bit line: the stored bit while powered, '0' while gated, and nothing
// (0) when its word line is low. The hold-'0' behaviour while gated is the
// published cell's; modelling the latch as a flip-flop, keeping the stored
// bit while gated and clearing the cell on reset (to match the all-'0'
// start state of the Zero-Switch Cells) are this design's choices.
module encom_cell_7t (
  input  logic clk,
  input  logic rst_n,
  input  logic wl,      // word line
  input  logic set,     // bit line driven to write '1'
  input  logic clr,     // bit line bar driven to write '0'
  input  logic pwr_on,  // group power gate conducting
  output logic rd,      // contribution to the read bit line
  output logic state    // stored bit, for status and checks
);

  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= 1'b0;
    else if (wl && set)  q <= 1'b1;
    else if (wl && clr)  q <= 1'b0;
  end

  // The seventh transistor holds the output at '0' while the group is off.
  assign rd    = wl & pwr_on & q;
  assign state = q;

endmodule
