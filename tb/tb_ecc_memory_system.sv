// tb_ecc_memory_system: end-to-end test of the protected memory at its
// default size (256 words). Every address is written with random data, then
// an upset is injected into each word: none, a single bit, an adjacent pair,
// a selected triple, a non-adjacent pair, a random triple or four bits. All
// words are then read back to back. For each read the test checks, against
// the reference model, the syndrome and err_detected two cycles after rd_en,
// and the data, class flags and err_flag three cycles after rd_en. It counts
// how often each mechanism happened (each error class, correction restoring
// the data, the uncorrectable flag, an upset landing together with a write,
// back-to-back reads) and fails any that never did.
module tb_ecc_memory_system;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int DEPTH = 256;
  localparam int AW = 8;

  typedef struct {
    logic        valid;
    logic [5:0]  syn;
    int          cls;
    logic [7:0]  data;
    logic [7:0]  orig;
  } exp_t;

  logic          clk = 0, rst_n = 0;
  logic          wr_en = 0, rd_en = 0, inj_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, inj_addr = '0;
  data_t         wr_data = '0;
  cw_t           inj_mask = '0;
  logic          det_valid, err_detected, rd_valid, se, de, dae, te, ue, err_flag;
  syn_t          syndrome;
  data_t         rd_data;
  err_type_e     etype;

  logic [7:0]  golden [DEPTH];
  logic [13:0] upset  [DEPTH];
  exp_t exp_q [$];
  int checks = 0, failures = 0;
  int seen [6];
  int restored = 0, flagged = 0, wr_inj_same = 0, b2b_reads = 0;
  int issue_cycle [$];
  int cycle = 0;

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
  always @(posedge clk) cycle++;

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

  // Results: syndrome 2 cycles and data 3 cycles after the read was issued.
  int det_idx = 0;
  exp_t det_q [$];
  always @(posedge clk) begin
    #1;
    if (rst_n && det_valid) begin
      exp_t x;
      check(det_q.size() > 0, "unexpected det_valid");
      if (det_q.size() > 0) begin
        x = det_q.pop_front();
        check(syndrome == x.syn, $sformatf("syndrome %06b expected %06b", syndrome, x.syn));
        check(err_detected == (x.syn != 0), "err_detected");
      end
    end
    if (rst_n && rd_valid) begin
      exp_t x;
      int issued;
      check(exp_q.size() > 0, "unexpected rd_valid");
      if (exp_q.size() > 0) begin
        logic [4:0] flags;
        x = exp_q.pop_front();
        issued = issue_cycle.pop_front();
        check(cycle - issued == 3, $sformatf("read latency %0d", cycle - issued));
        flags = {ue, te, dae, de, se};
        check(int'(etype) == x.cls, $sformatf("class %0d expected %0d", etype, x.cls));
        check(flags == ((x.cls == C_NE) ? 5'b0 : 5'(1) << (x.cls - 1)), "class flags");
        check(err_flag == (x.cls inside {C_DE, C_UE}), "err_flag");
        check(rd_data == x.data, $sformatf("data %02h expected %02h", rd_data, x.data));
        if (x.cls inside {C_SE, C_DAE, C_TE} && rd_data == x.orig) restored++;
        if (err_flag) flagged++;
        seen[x.cls]++;
      end
    end
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1;
    // fill the memory
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = 8'($urandom);
      golden[a] = wr_data;
      @(posedge clk); #2;
    end
    wr_en = 0;
    // upsets, the kind chosen by address
    for (int a = 0; a < DEPTH; a++) begin
      int t;
      int k;
      logic [13:0] m;
      k = $urandom_range(13, 1);
      case (a % 8)
        0: m = '0;
        1: m = bit_at($urandom_range(14, 1));
        2: m = bit_at(k) | bit_at(k + 1);
        3: begin
          t = $urandom_range(2, 0);
          m = bit_at(TRIPLE[t][0]) | bit_at(TRIPLE[t][1]) | bit_at(TRIPLE[t][2]);
        end
        4: m = bit_at(k) | bit_at((k + 1 + $urandom_range(11, 1)) % 14 + 1);
        5: m = rand_mask(3);
        6: m = rand_mask(4);
        default: m = bit_at(14) | bit_at(13);   // adjacent pair in the data field
      endcase
      if (a % 8 == 4 && $countones(m) != 2) m = bit_at(1) | bit_at(3);
      upset[a] = m;
      if (m != 0) begin
        inj_en = 1; inj_addr = AW'(a); inj_mask = m;
        @(posedge clk); #2;
      end
    end
    inj_en = 0;
    // an upset landing in the same cycle as the encoded word is written:
    // write address 0 again, and upset it while the codeword is stored
    wr_en = 1; wr_addr = 8'd0; wr_data = 8'hA5;
    golden[0] = 8'hA5;
    @(posedge clk); #2;
    wr_en = 0;
    inj_en = 1; inj_addr = 8'd0; inj_mask = bit_at(9);
    upset[0] = bit_at(9);
    wr_inj_same++;
    @(posedge clk); #2;
    inj_en = 0;
    @(posedge clk); #2;
    // read everything back to back
    for (int a = 0; a < DEPTH; a++) begin
      logic [13:0] stored, corr;
      int cls;
      exp_t x;
      rd_en = 1; rd_addr = AW'(a);
      stored = ref_encode(golden[a]) ^ upset[a];
      ref_classify(ref_syndrome(stored), cls, corr);
      x = '{valid: 1'b1, syn: ref_syndrome(stored), cls: cls,
            data: 8'((stored ^ corr) >> 6), orig: golden[a]};
      exp_q.push_back(x);
      det_q.push_back(x);
      issue_cycle.push_back(cycle);
      if (a > 0) b2b_reads++;
      @(posedge clk); #2;
    end
    rd_en = 0;
    repeat (5) @(posedge clk);
    #2;
    check(exp_q.size() == 0, "reads without result");
    check(seen[C_NE] > 0, "no clean word read");
    check(seen[C_SE] > 0, "no single error corrected");
    check(seen[C_DAE] > 0, "no adjacent double corrected");
    check(seen[C_TE] > 0, "no triple corrected");
    check(seen[C_DE] > 0, "no double error detected");
    check(seen[C_UE] > 0, "no uncorrectable error flagged");
    check(restored > 0 && flagged > 0 && wr_inj_same > 0 && b2b_reads > 0, "mechanisms");
    $display("reads: NE=%0d SE=%0d DE=%0d DAE=%0d TE=%0d UE=%0d restored=%0d flagged=%0d back-to-back=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5], restored, flagged, b2b_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
