// tb_encom_row_decoder: exhaustive check of the 4:16 row decoder and its
// Zero-Switch word-line selection over every address, enable and pulse value.
module tb_encom_row_decoder;
  import encom_pkg::*;

  logic [ROW_AW-1:0]   row_addr;
  logic                en, pg;
  logic [ROWS-1:0]     wl;
  logic [SEGMENTS-1:0] zs_wl;
  int checks = 0, failures = 0;

  encom_row_decoder dut (.row_addr, .en, .pg, .wl, .zs_wl);

  initial begin
    for (int a = 0; a < ROWS; a++)
      for (int e = 0; e < 2; e++)
        for (int p = 0; p < 2; p++) begin
          logic [ROWS-1:0]     exp_wl;
          logic [SEGMENTS-1:0] exp_zs;
          row_addr = a[ROW_AW-1:0]; en = e[0]; pg = p[0];
          #1;
          exp_wl = '0;
          if (e == 1) exp_wl[a] = 1'b1;
          exp_zs = '0;
          if (p == 1) exp_zs[a / 8] = 1'b1;   // rows 0-7 top, 8-15 bottom
          checks++;
          if (wl !== exp_wl) begin failures++; $display("FAIL wl a=%0d e=%0d: %h", a, e, wl); end
          checks++;
          if (zs_wl !== exp_zs) begin failures++; $display("FAIL zs_wl a=%0d p=%0d: %b", a, p, zs_wl); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
