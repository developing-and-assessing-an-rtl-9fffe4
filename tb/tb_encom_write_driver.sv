// tb_encom_write_driver: checks the bit-line drivers for every byte in the
// first write cycle, the dual-write cycle and idle.
module tb_encom_write_driver;
  import encom_pkg::*;

  logic [BYTE_W-1:0] data, set, clr;
  logic              we, dwp;
  int checks = 0, failures = 0;

  encom_write_driver dut (.data, .we, .dwp, .set, .clr);

  initial begin
    for (int d = 0; d < 256; d++)
      for (int ph = 0; ph < 3; ph++) begin   // 0 idle, 1 first cycle, 2 dual
        logic [BYTE_W-1:0] es, ec;
        data = d[7:0]; we = (ph == 1); dwp = (ph == 2);
        #1;
        es = (ph == 0) ? 8'h00 : d[7:0];
        ec = (ph == 1) ? ~d[7:0] : 8'h00;
        checks++;
        if (set !== es || clr !== ec) begin
          failures++; $display("FAIL d=%h ph=%0d set=%h clr=%h", d, ph, set, clr);
        end
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
