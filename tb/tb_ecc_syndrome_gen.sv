// tb_ecc_syndrome_gen: checks the syndrome generator on all 16384 possible
// 14-bit words against the reference syndrome (received parity XOR parity
// recomputed from the received data), and that every codeword gives zero.
module tb_ecc_syndrome_gen;
  import ecc_ref_pkg::*;

  logic [13:0] cw;
  logic [5:0]  syn;
  int checks = 0, failures = 0;

  ecc_syndrome_gen dut (.codeword(cw), .syndrome(syn));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 16384; w++) begin
      cw = 14'(w);
      #1;
      checks++;
      if (syn !== ref_syndrome(cw)) begin
        failures++;
        $display("cw=%04h syndrome=%06b expected %06b", cw, syn, ref_syndrome(cw));
      end
    end
    for (int d = 0; d < 256; d++) begin
      cw = ref_encode(8'(d));
      #1;
      checks++;
      if (syn !== 6'b0) begin
        failures++;
        $display("codeword of %02h gives syndrome %06b", d, syn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
