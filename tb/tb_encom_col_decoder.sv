// tb_encom_col_decoder: exhaustive check of the 2:4 column decoder.
module tb_encom_col_decoder;
  import encom_pkg::*;

  logic [COL_AW-1:0]  col_addr;
  logic               en;
  logic [COL_SEL-1:0] col_sel;
  int checks = 0, failures = 0;

  encom_col_decoder dut (.col_addr, .en, .col_sel);

  initial begin
    for (int a = 0; a < COL_SEL; a++)
      for (int e = 0; e < 2; e++) begin
        col_addr = a[COL_AW-1:0]; en = e[0];
        #1;
        checks++;
        if (col_sel !== (e == 1 ? COL_SEL'(1 << a) : COL_SEL'(0))) begin
          failures++; $display("FAIL a=%0d e=%0d sel=%b", a, e, col_sel);
        end
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
