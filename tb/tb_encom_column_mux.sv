// tb_encom_column_mux: random check of both directions of the 4:1 column
// multiplexer against the mapping bit i <-> column 4*i + select.
module tb_encom_column_mux;
  import encom_pkg::*;

  logic [COL_SEL-1:0] col_sel;
  logic [BYTE_W-1:0]  set, clr, rd;
  logic [COLS-1:0]    col_set, col_clr, col_rd;
  int checks = 0, failures = 0;

  encom_column_mux dut (.col_sel, .set, .clr, .col_set, .col_clr, .col_rd, .rd);

  initial begin
    for (int n = 0; n < 400; n++) begin
      int k;
      logic [COLS-1:0]   es, ec;
      logic [BYTE_W-1:0] er;
      k = $urandom_range(0, COL_SEL);            // COL_SEL means none selected
      col_sel = (k == COL_SEL) ? '0 : COL_SEL'(1 << k);
      set = BYTE_W'($urandom); clr = BYTE_W'($urandom); col_rd = $urandom;
      #1;
      es = '0; ec = '0; er = '0;
      if (k != COL_SEL)
        for (int i = 0; i < BYTE_W; i++) begin
          es[i*4 + k] = set[i];
          ec[i*4 + k] = clr[i];
          er[i]       = col_rd[i*4 + k];
        end
      checks++;
      if (col_set !== es || col_clr !== ec) begin
        failures++; $display("FAIL write k=%0d set=%h -> %h", k, set, col_set);
      end
      checks++;
      if (rd !== er) begin failures++; $display("FAIL read k=%0d rd=%h exp %h", k, rd, er); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
