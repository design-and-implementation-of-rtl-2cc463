// tb_ecc_parity_gen: checks the parity generation unit against the reference
// parity masks for all 256 data words.
module tb_ecc_parity_gen;
  import ecc_ref_pkg::*;

  logic [7:0] data;
  logic [5:0] parity;
  int checks = 0, failures = 0;

  ecc_parity_gen dut (.data(data), .parity(parity));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 256; d++) begin
      data = 8'(d);
      #1;
      checks++;
      if (parity !== ref_parity(data)) begin
        failures++;
        $display("data=%02h parity=%06b expected %06b", data, parity, ref_parity(data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
