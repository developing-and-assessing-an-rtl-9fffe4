// tb_encom_sram_inv: the subarray with data inversion enabled, for data
// that is mostly '1'. Bytes of all ones must be stored as zeros: they are
// written in a single cycle, leave their groups gated and read back as
// 8'hFF. Random bytes are then written and read back through a reference
// copy, and the groups that power up are those written with a '0'.
module tb_encom_sram_inv;
  import encom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                          req_valid, req_ready, req_we;
  logic [ADDR_W-1:0]             req_addr;
  logic [BYTE_W-1:0]             req_wdata;
  logic                          rsp_valid;
  logic [BYTE_W-1:0]             rsp_rdata;
  logic [SEGMENTS-1:0][COLS-1:0] group_on;
  logic                          dual_write, sense_isolate;

  encom_sram #(.INVERT_DATA(1'b1)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .rsp_valid, .rsp_rdata, .group_on, .dual_write, .sense_isolate);

  always #5 clk = ~clk;

  logic [BYTE_W-1:0] ref_mem [2**ADDR_W];
  int checks = 0, failures = 0, n_dual = 0;

  always @(posedge clk) if (rst_n && dual_write) n_dual++;

  task automatic write(input logic [ADDR_W-1:0] a, input logic [BYTE_W-1:0] d);
    @(negedge clk);
    req_valid = 1'b1; req_we = 1'b1; req_addr = a; req_wdata = d;
    do @(posedge clk); while (!req_ready);
    ref_mem[a] = d;
    #1 req_valid = 1'b0;
  endtask

  task automatic read_check(input logic [ADDR_W-1:0] a);
    @(negedge clk);
    req_valid = 1'b1; req_we = 1'b0; req_addr = a;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (!rsp_valid || rsp_rdata !== ref_mem[a]) begin
      failures++; $display("FAIL read %0d: valid=%b %h exp %h", a, rsp_valid, rsp_rdata, ref_mem[a]);
    end
  endtask

  initial begin
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    for (int i = 0; i < 2**ADDR_W; i++) ref_mem[i] = 8'hFF;   // stored zeros read as ones
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2**ADDR_W; i++) read_check(ADDR_W'(i));
    for (int i = 0; i < 2**ADDR_W; i++) write(ADDR_W'(i), 8'hFF);
    repeat (3) @(posedge clk);
    checks++;
    if (n_dual != 0 || group_on !== '0) begin
      failures++; $display("FAIL all-ones writes: duals=%0d group_on=%h", n_dual, group_on);
    end
    write(6'd0, 8'hFE);    // stored 0x01: powers the group of bit 0, column 0
    repeat (3) @(posedge clk);
    checks++;
    if (n_dual != 1 || group_on[0] !== 32'h1 || group_on[1] !== '0) begin
      failures++; $display("FAIL single zero bit: duals=%0d group_on=%h", n_dual, group_on);
    end
    for (int n = 0; n < 400; n++) begin
      if ($urandom_range(0, 1) != 0) write(ADDR_W'($urandom), BYTE_W'($urandom) | BYTE_W'($urandom));
      else read_check(ADDR_W'($urandom));
    end
    for (int i = 0; i < 2**ADDR_W; i++) read_check(ADDR_W'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
