// encom_zs_cell: Zero-Switch Cell, the 6T cell plus inverter driver that
// records whether its compress group may be switched off.
//
// A stored '0' means every cell of the group holds '0'; the inverter then
// raises `enable_zero`, which turns the group's power gate off and asserts
// the hold-'0' transistor of each 7T cell. A stored '1' keeps the group
// powered. The cell is written like any SRAM cell, on the clock
// edge while its word line `wl` is high (`set` writes '1', `clr` writes
// '0'). Reset stores '0', the published start value of every Zero-Switch
// Cell. `state` exposes the stored bit for status and test. The 6T cell
// with an inverter driver is the published structure; the clocked write is
// this design's logical model of it.
module encom_zs_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic wl,           // Zero-Switch word line (from the row decoder)
  input  logic set,          // bit line driven to write '1'
  input  logic clr,          // bit line bar driven to write '0'
  output logic enable_zero,  // inverter output: gate the group, force '0'
  output logic state         // stored bit
);

  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= 1'b0;
    else if (wl && set)  q <= 1'b1;
    else if (wl && clr)  q <= 1'b0;
  end

  assign enable_zero = ~q;
  assign state       = q;

endmodule
