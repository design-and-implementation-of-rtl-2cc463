// ecc_memory_system: memory protected by the (14,8) SEC-DED-DAEC-STEC code.
//
// Write path: wr_data is encoded by ecc_encoder (one register stage) and the
// 14-bit codeword is written into ecc_memory the next cycle.
// Read path: the stored codeword is read (one cycle) and decoded by
// ecc_decoder (two cycles), so rd_valid, rd_data and the class flags follow
// rd_en by three cycles; det_valid, syndrome and err_detected follow rd_en by
// two. err_flag marks an uncorrectable word (DE or UE); its data is the
// stored data field, uncorrected.
// Upsets are injected into stored words through inj_en/inj_addr/inj_mask.
// The encoder -> memory -> decoder chain is the memory system the code was
// proposed for; the pipeline registers, handshake, depth and upset port are
// this design's choices.
// Ordering rule: because a write lands in the array one cycle after wr_en, a
// read of the same address must start at least two cycles after the write.
module ecc_memory_system
  import ecc_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // write port
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  data_t             wr_data,
  // read port
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              det_valid,
  output syn_t              syndrome,
  output logic              err_detected,
  output logic              rd_valid,
  output data_t             rd_data,
  output err_type_e         etype,
  output logic              se,
  output logic              de,
  output logic              dae,
  output logic              te,
  output logic              ue,
  output logic              err_flag,
  // upset injection
  input  logic              inj_en,
  input  logic [ADDR_W-1:0] inj_addr,
  input  cw_t               inj_mask
);

  logic              enc_valid;
  cw_t               enc_word;
  logic [ADDR_W-1:0] wr_addr_q;
  logic              rd_valid_mem;
  cw_t               mem_word;

  ecc_encoder u_encoder (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (wr_en),
    .data      (wr_data),
    .out_valid (enc_valid),
    .encoded   (enc_word)
  );

  always_ff @(posedge clk) begin
    if (wr_en) wr_addr_q <= wr_addr;
    if (!rst_n) rd_valid_mem <= 1'b0;
    else        rd_valid_mem <= rd_en;
  end

  ecc_memory #(
    .DEPTH  (DEPTH),
    .ADDR_W (ADDR_W)
  ) u_memory (
    .clk      (clk),
    .wr_en    (enc_valid),
    .wr_addr  (wr_addr_q),
    .wr_data  (enc_word),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .rd_data  (mem_word),
    .inj_en   (inj_en),
    .inj_addr (inj_addr),
    .inj_mask (inj_mask)
  );

  ecc_decoder u_decoder (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (rd_valid_mem),
    .encoded      (mem_word),
    .det_valid    (det_valid),
    .syndrome     (syndrome),
    .err_detected (err_detected),
    .out_valid    (rd_valid),
    .corrected    (rd_data),
    .etype        (etype),
    .se           (se),
    .de           (de),
    .dae          (dae),
    .te           (te),
    .ue           (ue)
  );

  assign err_flag = de | ue;

  // A read must not start the cycle after a write to the same address.
  a_raw_spacing : assert property (@(posedge clk) disable iff (!rst_n)
    wr_en ##1 rd_en |-> rd_addr != $past(wr_addr))
    else $warning("read of address %0d one cycle after its write returns stale data", rd_addr);

endmodule
