// encom_compress_group: eight 7T cells of one column and one segment, their
// power gate and their Zero-Switch Cell.
//
// The group is the unit that En-Com switches off. Its Zero-Switch Cell holds
// '0' while all eight cells hold '0'; then the power gate is off and every
// cell reads '0' through its seventh transistor. Writing a '1' to any cell
// of the group is followed, one cycle later, by a write of '1' to the
// Zero-Switch Cell (the dual write), which powers the group up. Writing a
// '0' never touches the Zero-Switch Cell, so once powered a group stays
// powered until reset; the invariant "Zero-Switch Cell '0' implies all
// cells '0'" still holds, and it is checked by an assertion: a '1' in a
// gated group must be followed by a '1' in the Zero-Switch Cell on the next
// cycle.
//
// Interface: `wl` are the eight word lines of the segment, `zs_wl` the
// segment's Zero-Switch word line, `set`/`clr` this column's bit-line
// drivers. `rd` is the column's read bit line (wired-OR of the cells, as
// only one word line is high). All writes happen on the rising clock edge.
module encom_compress_group
  import encom_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [GROUP_SIZE-1:0] wl,       // word lines of the segment
  input  logic                  zs_wl,    // Zero-Switch word line
  input  logic                  set,      // column bit line: write '1'
  input  logic                  clr,      // column bit line bar: write '0'
  output logic                  rd,       // column read bit line
  output logic                  pwr_on    // group powered (Zero-Switch '1')
);

  logic                  enable_zero;
  logic                  zs_state;
  logic [GROUP_SIZE-1:0] cell_rd;
  logic [GROUP_SIZE-1:0] cell_state;

  encom_zs_cell u_zs (
    .clk         (clk),
    .rst_n       (rst_n),
    .wl          (zs_wl),
    .set         (set),
    .clr         (clr),
    .enable_zero (enable_zero),
    .state       (zs_state)
  );

  // Power gate: a PMOS switch on the group's supply, off while enable_zero.
  assign pwr_on = ~enable_zero;

  for (genvar i = 0; i < GROUP_SIZE; i++) begin : g_cell
    encom_cell_7t u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .wl     (wl[i]),
      .set    (set),
      .clr    (clr),
      .pwr_on (pwr_on),
      .rd     (cell_rd[i]),
      .state  (cell_state[i])
    );
  end

  assign rd = |cell_rd;

  // A '1' written into a gated group must switch the group on next cycle.
  a_zero_switch_follows : assert property (
    @(posedge clk) disable iff (!rst_n) (|cell_state && !zs_state) |=> zs_state
  ) else $error("compress group holds a '1' while its Zero-Switch Cell stays '0'");

endmodule
