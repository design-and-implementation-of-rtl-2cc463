// tb_ecc_memory: checks the codeword array against a shadow copy: writes to
// every address, reads back with one-cycle latency, upsets through the
// injection port (alone, and together with a write to the same or another
// address), and read-during-write returning the old word.
module tb_ecc_memory;
  import ecc_pkg::*;

  localparam int DEPTH = 32;
  localparam int AW = 5;

  logic          clk = 0;
  logic          wr_en = 0, rd_en = 0, inj_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, inj_addr = '0;
  cw_t           wr_data = '0, inj_mask = '0, rd_data;
  cw_t           shadow [DEPTH];
  int checks = 0, failures = 0;

  ecc_memory #(.DEPTH(DEPTH)) dut (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .inj_en(inj_en), .inj_addr(inj_addr), .inj_mask(inj_mask)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    wr_en = 0; rd_en = 0; inj_en = 0;
  endtask

  task automatic read_check(input int a, input cw_t exp);
    rd_en = 1; rd_addr = AW'(a);
    @(posedge clk); #2;
    rd_en = 0;
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("addr %0d read %04h expected %04h", a, rd_data, exp);
    end
  endtask

  initial begin
    @(posedge clk); #2;
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = 14'($urandom);
      shadow[a] = wr_data;
      @(posedge clk); #2;
    end
    idle();
    for (int a = 0; a < DEPTH; a++) read_check(a, shadow[a]);
    // upsets alone
    for (int n = 0; n < 40; n++) begin
      automatic int a = $urandom_range(DEPTH-1, 0);
      inj_en = 1; inj_addr = AW'(a); inj_mask = 14'($urandom);
      shadow[a] ^= inj_mask;
      @(posedge clk); #2;
      idle();
      read_check(a, shadow[a]);
    end
    // upset and write on the same address: written word with upset applied
    wr_en = 1; wr_addr = 5'd3; wr_data = 14'h1234;
    inj_en = 1; inj_addr = 5'd3; inj_mask = 14'h0011;
    shadow[3] = 14'h1234 ^ 14'h0011;
    @(posedge clk); #2;
    idle();
    read_check(3, shadow[3]);
    // upset and write on different addresses
    wr_en = 1; wr_addr = 5'd4; wr_data = 14'h0abc;
    inj_en = 1; inj_addr = 5'd5; inj_mask = 14'h2001;
    shadow[4] = 14'h0abc;
    shadow[5] ^= 14'h2001;
    @(posedge clk); #2;
    idle();
    read_check(4, shadow[4]);
    read_check(5, shadow[5]);
    // read during write returns the old word
    wr_en = 1; wr_addr = 5'd7; wr_data = ~shadow[7];
    rd_en = 1; rd_addr = 5'd7;
    @(posedge clk); #2;
    idle();
    checks++;
    if (rd_data !== shadow[7]) begin failures++; $display("read during write"); end
    shadow[7] = ~shadow[7];
    read_check(7, shadow[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
