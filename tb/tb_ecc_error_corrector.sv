// tb_ecc_error_corrector: checks the syndrome lookup for all 64 syndromes
// against the reference search, checks the single and adjacent-double rows
// of the code's syndrome table literally (syndrome 000001 flips bit 1, ...,
// 110000 flips bits 5 and 6), and checks how many syndromes each class owns:
// 14 SE, 13 DAE and 1 TE with the default triple list.
module tb_ecc_error_corrector;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  syn_t      syn;
  cw_t       corr;
  err_type_e etype;
  logic      se, de, dae, te, ue;
  int checks = 0, failures = 0;
  int count [6];

  ecc_error_corrector dut (
    .syndrome(syn), .correction(corr), .etype(etype),
    .se(se), .de(de), .dae(dae), .te(te), .ue(ue)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cls;
    logic [13:0] exp_corr;
    logic [5:0] flags;
    foreach (count[i]) count[i] = 0;
    for (int s = 0; s < 64; s++) begin
      syn = 6'(s);
      #1;
      ref_classify(syn, cls, exp_corr);
      count[cls]++;
      check(int'(etype) == cls, $sformatf("syndrome %06b class %0d expected %0d", syn, etype, cls));
      check(corr == exp_corr, $sformatf("syndrome %06b correction %014b expected %014b", syn, corr, exp_corr));
      flags = {1'b0, ue, te, dae, de, se};
      check(flags == ((cls == C_NE) ? 6'b0 : 6'(1) << (cls - 1)),
            $sformatf("syndrome %06b flags %05b for class %0d", syn, flags[4:0], cls));
    end
    // literal single and adjacent rows of the syndrome table
    for (int k = 1; k <= 6; k++) begin
      syn = 6'(1) << (k - 1);
      #1;
      check(etype == ERR_SE && corr == bit_at(k), $sformatf("table row: bit-%0d error", k));
    end
    for (int k = 1; k <= 5; k++) begin
      syn = 6'(3) << (k - 1);
      #1;
      check(etype == ERR_DAE && corr == (bit_at(k) | bit_at(k+1)),
            $sformatf("table row: adjacent bits (%0d,%0d)", k, k+1));
    end
    check(count[C_SE] == 14, $sformatf("%0d SE syndromes", count[C_SE]));
    check(count[C_DAE] == 13, $sformatf("%0d DAE syndromes", count[C_DAE]));
    check(count[C_TE] == 1, $sformatf("%0d TE syndromes", count[C_TE]));
    $display("classes: NE=%0d SE=%0d DE=%0d DAE=%0d TE=%0d UE=%0d",
             count[0], count[1], count[2], count[3], count[4], count[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
