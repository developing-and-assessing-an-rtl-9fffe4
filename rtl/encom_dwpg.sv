// encom_dwpg: access sequencer with the dual write pulse generator.
//
// Every access takes one cycle on the array, except a write whose byte
// holds at least one '1': the pulse generator then stays active for one
// more cycle and emits the dual write pulse `dwp`, during which the
// Zero-Switch Cells of the written columns are set. Reads never raise the
// pulse.
//
// Timing: a request accepted on a rising edge (`start`) is executed in the
// following cycle (state READ or WRITE). `ready` is low only in the WRITE
// cycle of a write that needs the dual cycle, so the next request waits one
// cycle; otherwise one byte is accepted every cycle. Outputs are decoded
// from the state register: `row_en` raises the word line (READ, WRITE),
// `col_en` the column select (any access), `we` the first write cycle,
// `dwp` the second, `sense` marks the cycle whose bit lines are sampled,
// `sa_iso` isolates the sense amplifier while the write drivers own the bit
// lines, which for a dual write lasts two cycles. The extra cycle for a '1'
// and the two-cycle isolation follow the published scheme; the ready/start
// handshake and the state encoding are this design's choice.
module encom_dwpg
  import encom_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,          // request accepted this edge
  input  logic       start_we,       // it is a write
  input  logic       start_has_one,  // its byte holds at least one '1'
  output logic       ready,          // a request may be accepted
  output seq_state_e state,          // current array cycle
  output logic       row_en,
  output logic       col_en,
  output logic       we,
  output logic       dwp,
  output logic       sense,
  output logic       sa_iso          // sense amplifier isolated from the bit lines
);

  seq_state_e state_q, state_d;
  logic       has_one_q;

  always_comb begin
    if (start)                                   state_d = start_we ? SEQ_WRITE : SEQ_READ;
    else if (state_q == SEQ_WRITE && has_one_q)  state_d = SEQ_DUAL;
    else                                         state_d = SEQ_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= SEQ_IDLE;
      has_one_q <= 1'b0;
    end else begin
      state_q <= state_d;
      if (start) has_one_q <= start_we & start_has_one;
    end
  end

  assign ready  = !(state_q == SEQ_WRITE && has_one_q);
  assign state  = state_q;
  assign row_en = (state_q == SEQ_READ) || (state_q == SEQ_WRITE);
  assign col_en = (state_q != SEQ_IDLE);
  assign we     = (state_q == SEQ_WRITE);
  assign dwp    = (state_q == SEQ_DUAL);
  assign sense  = (state_q == SEQ_READ);
  assign sa_iso = (state_q == SEQ_WRITE) || (state_q == SEQ_DUAL);

  a_no_start_when_busy : assert property (
    @(posedge clk) disable iff (!rst_n) start |-> ready
  ) else $error("request accepted while the dual write cycle is pending");

  a_dual_after_one : assert property (
    @(posedge clk) disable iff (!rst_n) (state_q == SEQ_WRITE && has_one_q) |=> (state_q == SEQ_DUAL)
  ) else $error("write of a '1' not followed by the dual write pulse");

endmodule
