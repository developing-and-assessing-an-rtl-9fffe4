// tb_encom_sram: end-to-end test of the En-Com SRAM subarray at its default
// size (16 x 32 cells, 64 bytes, 64 compress groups).
//
// A requester issues random reads and writes through the valid/ready port
// and keeps a reference copy of the 64 bytes and of which groups must be
// powered (a group powers up once any '1' has been written into it). Every
// read response is compared with the reference, its latency (two edges
// after acceptance) is checked, and so is the power state of all 64 groups
// after every accepted request. Directed phases then check the cycle cost:
// 64 back-to-back reads take 64 cycles, an all-zero write takes one cycle
// and a write holding a '1' takes two. The test counts each mechanism of
// the design (reads of gated groups, dual writes, stalls of the requester
// during a dual write, zero writes that skip the dual cycle, power-ups) and
// fails if one never happened.
module tb_encom_sram;
  import encom_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic                          req_valid, req_ready, req_we;
  logic [ADDR_W-1:0]             req_addr;
  logic [BYTE_W-1:0]             req_wdata;
  logic                          rsp_valid;
  logic [BYTE_W-1:0]             rsp_rdata;
  logic [SEGMENTS-1:0][COLS-1:0] group_on;
  logic                          dual_write, sense_isolate;

  encom_sram dut (.clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
                  .rsp_valid, .rsp_rdata, .group_on, .dual_write, .sense_isolate);

  always #5 clk = ~clk;

  logic [BYTE_W-1:0]             ref_mem [2**ADDR_W];
  logic [SEGMENTS-1:0][COLS-1:0] ref_on;
  int checks = 0, failures = 0;
  int n_gated_reads = 0, n_dual = 0, n_stall = 0, n_zero_writes = 0, n_power_up = 0, n_reads = 0;
  longint cycle = 0;
  longint last_wr = 0;   // cycle in which the last write was accepted

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && dual_write) n_dual++;
  always @(posedge clk) if (rst_n && req_valid && !req_ready) n_stall++;

  // The sense amplifier is isolated exactly while the array is written: two
  // consecutive cycles around every dual write, never during a read.
  int n_iso2 = 0;
  logic iso_d = 1'b0;
  always @(posedge clk) begin
    iso_d <= sense_isolate;
    if (rst_n && dual_write) begin
      checks++;
      if (!(sense_isolate && iso_d)) begin failures++; $display("FAIL isolation not held for two cycles"); end
      else n_iso2++;
    end
  end
  // iso_d holds the isolation of the cycle that just ended; a response
  // registered at that edge comes from a read cycle, which is never isolated.
  always @(negedge clk) begin
    if (rst_n && rsp_valid) begin
      checks++;
      if (iso_d) begin failures++; $display("FAIL sense amplifier isolated during a read"); end
    end
  end

  // Expected responses, in order, with the cycle they must appear in.
  logic [BYTE_W-1:0] exp_q[$];
  longint            exp_t[$];

  always @(posedge clk) begin
    if (rst_n && rsp_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected response %h", rsp_rdata);
      end else begin
        logic [BYTE_W-1:0] e;
        longint t;
        e = exp_q.pop_front(); t = exp_t.pop_front();
        if (rsp_rdata !== e) begin failures++; $display("FAIL read data %h exp %h", rsp_rdata, e); end
        checks++;
        if (cycle != t) begin failures++; $display("FAIL read latency: at %0d exp %0d", cycle, t); end
      end
    end
  end

  function automatic int col_of(input int col_byte, input int bitpos);
    return bitpos * COL_SEL + col_byte;
  endfunction

  // Update the reference for an accepted request at the current edge.
  task automatic model(input logic we, input logic [ADDR_W-1:0] a, input logic [BYTE_W-1:0] d);
    int row, cb, seg;
    row = int'(a[ADDR_W-1:COL_AW]); cb = int'(a[COL_AW-1:0]); seg = row / GROUP_SIZE;
    if (we) begin
      last_wr = cycle;
      ref_mem[a] = d;
      if (d == '0) n_zero_writes++;
      for (int i = 0; i < BYTE_W; i++)
        if (d[i]) begin
          if (!ref_on[seg][col_of(cb, i)]) n_power_up++;
          ref_on[seg][col_of(cb, i)] = 1'b1;
        end
    end else begin
      n_reads++;
      for (int i = 0; i < BYTE_W; i++)
        if (!ref_on[seg][col_of(cb, i)]) begin n_gated_reads++; break; end
      exp_q.push_back(ref_mem[a]);
      exp_t.push_back(cycle + 2);
    end
  endtask

  // Issue one request and hold it until accepted; returns the accept cycle.
  task automatic issue(input logic we, input logic [ADDR_W-1:0] a, input logic [BYTE_W-1:0] d,
                       output longint t_acc);
    req_valid = 1'b1; req_we = we; req_addr = a; req_wdata = d;
    forever begin
      @(posedge clk);
      if (req_ready) break;
    end
    t_acc = cycle;
    model(we, a, d);
    #1;
    req_valid = 1'b0;
  endtask

  // Image-like byte: neighbouring pixels share zero MSB/LSB positions often.
  function automatic logic [BYTE_W-1:0] pixel();
    logic [BYTE_W-1:0] p;
    p = BYTE_W'($urandom);
    if ($urandom_range(0, 3) != 0) p &= 8'h7E;
    if ($urandom_range(0, 2) == 0) p = '0;
    return p;
  endfunction

  always @(negedge clk) begin
    // The Zero-Switch Cells settle two edges after a write is accepted.
    if (rst_n && cycle - last_wr >= 3) begin
      checks++;
      if (group_on !== ref_on) begin failures++; $display("FAIL group_on %h exp %h", group_on, ref_on); end
    end
  end

  initial begin
    longint t0, t1, t;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    ref_on = '0;
    for (int i = 0; i < 2**ADDR_W; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // After reset every group is gated and the whole array reads zero.
    checks++;
    if (group_on !== '0) begin failures++; $display("FAIL groups powered after reset"); end
    @(negedge clk);
    issue(1'b0, '0, '0, t0);
    for (int i = 1; i < 2**ADDR_W; i++) issue(1'b0, ADDR_W'(i), '0, t);
    checks++;   // 64 reads accepted in 64 consecutive cycles
    if (t - t0 != 2**ADDR_W - 1) begin failures++; $display("FAIL read rate: %0d cycles", t - t0); end

    // An all-zero write costs one cycle, a write holding a '1' costs two.
    issue(1'b1, 6'd5, 8'h00, t0);
    issue(1'b0, 6'd6, 8'h00, t1);
    checks++;
    if (t1 - t0 != 1) begin failures++; $display("FAIL zero write took %0d cycles", t1 - t0); end
    issue(1'b1, 6'd41, 8'h81, t0);
    issue(1'b0, 6'd41, 8'h00, t1);
    checks++;
    if (t1 - t0 != 2) begin failures++; $display("FAIL dual write took %0d cycles", t1 - t0); end

    // Fill the array with an image-like pattern, then random traffic.
    for (int i = 0; i < 2**ADDR_W; i++) if ($urandom_range(0, 1) != 0) issue(1'b1, ADDR_W'(i), pixel(), t);
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk); #1;     // idle cycle
      end else if ($urandom_range(0, 2) == 0) issue(1'b1, ADDR_W'($urandom), pixel(), t);
      else issue(1'b0, ADDR_W'($urandom), '0, t);
    end
    for (int i = 0; i < 2**ADDR_W; i++) issue(1'b0, ADDR_W'(i), '0, t);
    repeat (4) @(posedge clk);

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d responses missing", exp_q.size()); end
    $display("mechanisms: iso2=%0d reads=%0d gated_reads=%0d dual_writes=%0d stalls=%0d zero_writes=%0d power_ups=%0d groups_on=%0d/64",
             n_iso2, n_reads, n_gated_reads, n_dual, n_stall, n_zero_writes, n_power_up, $countones(group_on));
    checks++; if (n_gated_reads == 0) begin failures++; $display("FAIL no read of a gated group"); end
    checks++; if (n_dual == 0)        begin failures++; $display("FAIL no dual write"); end
    checks++; if (n_stall == 0)       begin failures++; $display("FAIL no stall"); end
    checks++; if (n_zero_writes == 0) begin failures++; $display("FAIL no zero write"); end
    checks++; if (n_iso2 == 0)        begin failures++; $display("FAIL no two-cycle isolation"); end
    checks++; if (n_power_up == 0)    begin failures++; $display("FAIL no power-up"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
