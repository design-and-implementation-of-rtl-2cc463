// tb_ecc_decoder: drives the decoder with codewords of random data carrying
// every single, every adjacent double, every double and every triple error
// pattern, the selected triple patterns, random 4-bit errors and clean words,
// mostly back to back with random gaps. Each result is checked against the
// reference model: the syndrome and err_detected exactly one cycle after the
// input, the data and class flags exactly two cycles after it. A correctable
// class must return the original data. Each class must occur.
module tb_ecc_decoder;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  typedef struct {
    logic        valid;
    logic [5:0]  syn;
    int          cls;
    logic [7:0]  data;     // expected decoder data output
    logic [7:0]  orig;     // data that was encoded
  } exp_t;

  logic      clk = 0, rst_n = 0, in_valid = 0;
  cw_t       encoded = '0;
  logic      det_valid, err_detected, out_valid;
  syn_t      syndrome;
  data_t     corrected;
  err_type_e etype;
  logic      se, de, dae, te, ue;

  int checks = 0, failures = 0;
  int seen [6];
  int restored = 0;
  exp_t exp_in, exp1, exp2;
  logic [13:0] patterns [$];

  ecc_decoder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .encoded(encoded),
    .det_valid(det_valid), .syndrome(syndrome), .err_detected(err_detected),
    .out_valid(out_valid), .corrected(corrected), .etype(etype),
    .se(se), .de(de), .dae(dae), .te(te), .ue(ue)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected-value pipeline, two stages deep like the decoder
  always @(posedge clk) begin
    exp2 <= exp1;
    exp1 <= exp_in;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      check(det_valid == exp1.valid, "det_valid timing");
      if (exp1.valid) begin
        check(syndrome == exp1.syn, $sformatf("syndrome %06b expected %06b", syndrome, exp1.syn));
        check(err_detected == (exp1.syn != 0), "err_detected");
      end
      check(out_valid == exp2.valid, "out_valid timing");
      if (exp2.valid) begin
        logic [4:0] flags;
        flags = {ue, te, dae, de, se};
        check(int'(etype) == exp2.cls, $sformatf("class %0d expected %0d", etype, exp2.cls));
        check(flags == ((exp2.cls == C_NE) ? 5'b0 : 5'(1) << (exp2.cls - 1)), "class flags");
        check(corrected == exp2.data, $sformatf("data %02h expected %02h", corrected, exp2.data));
        if (exp2.cls inside {C_NE, C_SE, C_DAE, C_TE} && corrected == exp2.orig) restored++;
        seen[exp2.cls]++;
      end
    end
  end

  initial begin
    logic [13:0] e, corr;
    int cls;
    foreach (seen[i]) seen[i] = 0;
    exp_in = '{valid: 1'b0, syn: '0, cls: 0, data: '0, orig: '0};
    // error patterns
    for (int i = 0; i < 20; i++) patterns.push_back('0);
    for (int i = 0; i < 14; i++) patterns.push_back(bit_at(i+1));
    for (int i = 0; i < 13; i++) patterns.push_back(bit_at(i+1) | bit_at(i+2));
    for (int i = 0; i < 3; i++)
      patterns.push_back(bit_at(TRIPLE[i][0]) | bit_at(TRIPLE[i][1]) | bit_at(TRIPLE[i][2]));
    for (int i = 1; i <= 14; i++)
      for (int j = i + 1; j <= 14; j++) begin
        patterns.push_back(bit_at(i) | bit_at(j));
        for (int k = j + 1; k <= 14; k++) patterns.push_back(bit_at(i) | bit_at(j) | bit_at(k));
      end
    for (int i = 0; i < 200; i++) patterns.push_back(rand_mask(4));

    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    foreach (patterns[n]) begin
      logic [7:0] d;
      while ($urandom_range(4, 0) == 0) begin
        in_valid = 0;
        exp_in.valid = 0;
        @(posedge clk); #2;
      end
      d = 8'($urandom);
      e = patterns[n];
      in_valid = 1;
      encoded = ref_encode(d) ^ e;
      ref_classify(ref_syndrome(encoded), cls, corr);
      exp_in = '{valid: 1'b1, syn: ref_syndrome(encoded), cls: cls,
                 data: 8'((encoded ^ corr) >> 6), orig: d};
      @(posedge clk); #2;
    end
    in_valid = 0;
    exp_in.valid = 0;
    repeat (3) @(posedge clk);
    #2;
    // every single, adjacent double and the unique triple restore the data
    check(restored >= 20 + 14 + 13 + 1, $sformatf("%0d words restored", restored));
    check(seen[C_NE] > 0 && seen[C_SE] > 0 && seen[C_DE] > 0 &&
          seen[C_DAE] > 0 && seen[C_TE] > 0 && seen[C_UE] > 0, "every class seen");
    $display("classes seen: NE=%0d SE=%0d DE=%0d DAE=%0d TE=%0d UE=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
