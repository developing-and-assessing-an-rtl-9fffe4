// encom_sram: En-Com energy-compressed SRAM subarray, 16 rows x 32 columns,
// one byte per access.
//
// Each column of each eight-row segment is a compress group whose
// Zero-Switch Cell records whether all eight cells hold '0'; such a group is
// power gated and still reads '0'. Writing a byte that contains a '1' costs
// one extra cycle in which the Zero-Switch Cells of the columns written with
// '1' are set, switching those groups on. Reads use the normal path and are
// never slowed down.
//
// Interface: a valid/ready request port (`req_*`) and a response port
// (`rsp_*`). Address bits [5:2] select the row (4:16 decoder), bits [1:0]
// the byte within the row (2:4 decoder). A request accepted on edge k is
// executed in cycle k+1; read data appears with `rsp_valid` one edge later.
// A write holding a '1' lowers `req_ready` for one cycle. `group_on` shows
// which of the 64 groups are powered, `dual_write` marks the extra cycle,
// `sense_isolate` is the isolation control of the (analog, not modelled)
// sense amplifier, high for every write cycle.
// With INVERT_DATA set, bytes are stored inverted, for data that is mostly
// '1'. Sizes, decoders, segmentation and the dual write follow the
// published design; the handshake, the address split, the response
// register and the reset of all cells to '0' are this design's choice.
module encom_sram
  import encom_pkg::*;
#(
  parameter bit INVERT_DATA = 1'b0  // store bytes inverted
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // request
  input  logic                          req_valid,
  output logic                          req_ready,
  input  logic                          req_we,
  input  logic [ADDR_W-1:0]             req_addr,
  input  logic [BYTE_W-1:0]             req_wdata,
  // response to reads
  output logic                          rsp_valid,
  output logic [BYTE_W-1:0]             rsp_rdata,
  // status
  output logic [SEGMENTS-1:0][COLS-1:0] group_on,
  output logic                          dual_write,
  output logic                          sense_isolate  // to the sense amplifier
);

  localparam logic [BYTE_W-1:0] INV = {BYTE_W{INVERT_DATA}};

  logic                start;
  logic [ADDR_W-1:0]   addr_q;
  logic [BYTE_W-1:0]   wdata_q;
  logic [BYTE_W-1:0]   store_data;
  logic                row_en, col_en, we, dwp, sense;
  logic [ROWS-1:0]     wl;
  logic [SEGMENTS-1:0] zs_wl;
  logic [COL_SEL-1:0]  col_sel;
  logic [BYTE_W-1:0]   bit_set, bit_clr, bit_rd;
  logic [COLS-1:0]     col_set, col_clr, col_rd;

  assign start      = req_valid & req_ready;
  assign store_data = req_wdata ^ INV;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      wdata_q <= '0;
    end else if (start) begin
      addr_q  <= req_addr;
      wdata_q <= store_data;
    end
  end

  encom_dwpg u_dwpg (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .start_we      (req_we),
    .start_has_one (|store_data),
    .ready         (req_ready),
    .state         (),
    .row_en        (row_en),
    .col_en        (col_en),
    .we            (we),
    .dwp           (dwp),
    .sense         (sense),
    .sa_iso        (sense_isolate)
  );

  encom_row_decoder u_row_dec (
    .row_addr (addr_q[ADDR_W-1:COL_AW]),
    .en       (row_en),
    .pg       (dwp),
    .wl       (wl),
    .zs_wl    (zs_wl)
  );

  encom_col_decoder u_col_dec (
    .col_addr (addr_q[COL_AW-1:0]),
    .en       (col_en),
    .col_sel  (col_sel)
  );

  encom_write_driver u_wr (
    .data (wdata_q),
    .we   (we),
    .dwp  (dwp),
    .set  (bit_set),
    .clr  (bit_clr)
  );

  encom_column_mux u_mux (
    .col_sel (col_sel),
    .set     (bit_set),
    .clr     (bit_clr),
    .col_set (col_set),
    .col_clr (col_clr),
    .col_rd  (col_rd),
    .rd      (bit_rd)
  );

  encom_sram_array u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .wl       (wl),
    .zs_wl    (zs_wl),
    .col_set  (col_set),
    .col_clr  (col_clr),
    .col_rd   (col_rd),
    .group_on (group_on)
  );

  // Sensed byte is registered at the end of the read cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      rsp_valid <= sense;
      if (sense) rsp_rdata <= bit_rd ^ INV;
    end
  end

  assign dual_write = dwp;

  a_req_held : assert property (
    @(posedge clk) disable iff (!rst_n)
      (req_valid && !req_ready) |=> (req_valid && $stable(req_addr) && $stable(req_we))
  ) else $error("request withdrawn or changed before it was accepted");

endmodule
