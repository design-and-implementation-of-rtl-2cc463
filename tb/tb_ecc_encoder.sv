// tb_ecc_encoder: streams all 256 data words, one per cycle, with gaps, into
// the encoder and checks each codeword and out_valid exactly one cycle later,
// and that reset clears out_valid.
module tb_ecc_encoder;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic  clk = 0, rst_n = 0, in_valid = 0;
  data_t data = '0;
  logic  out_valid;
  cw_t   encoded;
  int checks = 0, failures = 0;
  logic        exp_valid = 0;
  logic [13:0] exp_cw = '0;

  ecc_encoder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .data(data),
                   .out_valid(out_valid), .encoded(encoded));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: what was driven before an edge must be out after it
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_valid || (exp_valid && encoded !== exp_cw)) begin
        failures++;
        $display("t=%0t valid=%b cw=%04h expected valid=%b cw=%04h",
                 $time, out_valid, encoded, exp_valid, exp_cw);
      end
    end
  end

  initial begin
    @(posedge clk); #2;
    rst_n = 1;
    @(posedge clk); #2;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("out_valid set after reset"); end
    for (int d = 0; d < 256; d++) begin
      in_valid = ($urandom_range(3, 0) != 0) || d == 0;
      data = 8'(d);
      if (!in_valid) d--;
      exp_valid = in_valid;
      if (in_valid) exp_cw = ref_encode(data);
      @(posedge clk); #2;
    end
    in_valid = 0;
    exp_valid = 0;
    @(posedge clk); #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
