// tb_ecc_table3_coverage: runs the functional-verification workload of the
// code (no error, single, non-adjacent double, adjacent double, triple and
// four-bit errors) exhaustively through the protected memory at its default
// size. Every error pattern of weight 0..4 over the 14 codeword bits (1471
// patterns) is applied as an upset to a freshly written random word, which
// is then read back. Each read is checked against the reference model, and
// the outcomes are tallied per row of the workload:
//   restored - no flag raised and the data is right
//   flagged  - DE or UE raised (err_flag)
//   wrong    - no flag raised but the data is wrong (a miscorrection, or an
//              error pattern that is itself a codeword)
// The expected tallies below come from enumerating the same patterns over
// the parity equations, with SE before DAE before the selected triples:
//   weight 0: 1 restored             weight 1: 14 restored
//   adjacent pairs: 13 restored      non-adjacent pairs: 54 flagged, 24 wrong
//   weight 3: 1 restored, 208 flagged, 155 wrong
//   weight 4: 550 flagged, 451 wrong
// The 24 non-adjacent pairs are those whose syndrome equals that of an
// adjacent pair; the code cannot tell them apart.
module tb_ecc_table3_coverage;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int AW = 8;

  logic          clk = 0, rst_n = 0;
  logic          wr_en = 0, rd_en = 0, inj_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, inj_addr = '0;
  data_t         wr_data = '0;
  cw_t           inj_mask = '0;
  logic          det_valid, err_detected, rd_valid, se, de, dae, te, ue, err_flag;
  syn_t          syndrome;
  data_t         rd_data;
  err_type_e     etype;

  int checks = 0, failures = 0;
  // tally[row][outcome]: rows 0 none, 1 single, 2 non-adjacent double,
  // 3 adjacent double, 4 triple, 5 four-bit; outcomes 0 restored, 1 flagged, 2 wrong
  int tally [6][3];
  int expected [6][3] = '{'{1, 0, 0}, '{14, 0, 0}, '{0, 54, 24}, '{13, 0, 0},
                          '{1, 208, 155}, '{0, 550, 451}};
  string row_name [6] = '{"no error", "single", "double non-adjacent",
                          "double adjacent", "triple", "four-bit"};

  ecc_memory_system dut (
    .clk(clk), .rst_n(rst_n),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr),
    .det_valid(det_valid), .syndrome(syndrome), .err_detected(err_detected),
    .rd_valid(rd_valid), .rd_data(rd_data), .etype(etype),
    .se(se), .de(de), .dae(dae), .te(te), .ue(ue), .err_flag(err_flag),
    .inj_en(inj_en), .inj_addr(inj_addr), .inj_mask(inj_mask)
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
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write a word, upset it, read it back and score the result
  task automatic run_pattern(input int n, input logic [13:0] e, input int row);
    logic [7:0]  d;
    logic [13:0] stored, corr;
    int cls, outcome;
    d = 8'($urandom);
    wr_en = 1; wr_addr = AW'(n); wr_data = d;
    @(posedge clk); #2;
    wr_en = 0;
    @(posedge clk); #2;                 // codeword now stored
    inj_en = (e != 0); inj_addr = AW'(n); inj_mask = e;
    @(posedge clk); #2;
    inj_en = 0;
    rd_en = 1; rd_addr = AW'(n);
    @(posedge clk); #2;
    rd_en = 0;
    @(posedge clk); #2;
    @(posedge clk); #2;
    check(rd_valid, "rd_valid three cycles after rd_en");
    stored = ref_encode(d) ^ e;
    ref_classify(ref_syndrome(stored), cls, corr);
    check(int'(etype) == cls, $sformatf("pattern %014b class %0d expected %0d", e, etype, cls));
    check(rd_data == 8'((stored ^ corr) >> 6), $sformatf("pattern %014b data", e));
    check(err_flag == (cls inside {C_DE, C_UE}), $sformatf("pattern %014b err_flag", e));
    outcome = err_flag ? 1 : (rd_data == d ? 0 : 2);
    tally[row][outcome]++;
  endtask

  initial begin
    automatic int n = 0;
    foreach (tally[i, j]) tally[i][j] = 0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    run_pattern(n++, '0, 0);
    for (int i = 1; i <= 14; i++) run_pattern(n++, bit_at(i), 1);
    for (int i = 1; i <= 14; i++)
      for (int j = i + 1; j <= 14; j++)
        run_pattern(n++, bit_at(i) | bit_at(j), (j == i + 1) ? 3 : 2);
    for (int i = 1; i <= 14; i++)
      for (int j = i + 1; j <= 14; j++)
        for (int k = j + 1; k <= 14; k++)
          run_pattern(n++, bit_at(i) | bit_at(j) | bit_at(k), 4);
    for (int i = 1; i <= 14; i++)
      for (int j = i + 1; j <= 14; j++)
        for (int k = j + 1; k <= 14; k++)
          for (int l = k + 1; l <= 14; l++)
            run_pattern(n++, bit_at(i) | bit_at(j) | bit_at(k) | bit_at(l), 5);
    for (int r = 0; r < 6; r++) begin
      $display("%-20s restored=%4d flagged=%4d wrong=%4d", row_name[r],
               tally[r][0], tally[r][1], tally[r][2]);
      for (int o = 0; o < 3; o++)
        check(tally[r][o] == expected[r][o],
              $sformatf("%s outcome %0d: %0d expected %0d", row_name[r], o, tally[r][o], expected[r][o]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
