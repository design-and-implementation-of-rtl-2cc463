// ecc_decoder: two-cycle decoder of the (14,8) SEC-DED-DAEC-STEC code.
//
// Stage 1 (detection): the syndrome of the received codeword is computed by
// ecc_syndrome_gen and registered together with the codeword; err_detected
// (non-zero syndrome) is available one cycle after the input.
// Stage 2 (correction): ecc_error_corrector classifies the syndrome and gives
// a correction vector, which is XORed onto the codeword; the data field
// (codeword bits 14..7) is extracted and registered with the class flags, two
// cycles after the input. This matches the detection time of one cycle and
// correction latency of two cycles given for the code. The stages are
// pipelined, so a new codeword may enter every cycle.
// Interface: encoded uses the ecc_pkg bit numbering; corrected[i-1] = d_i.
// Exactly one of se/de/dae/te/ue is high for a faulty word, none for a clean
// one. On DE and UE the data is passed on uncorrected. Only the data field of
// the corrected codeword leaves the decoder, so the parity bits of the
// corrected word are computed but unused (a lint tool reports them). rst_n (active low,
// synchronous) clears only the valid bits; the valid handshake is this
// design's choice.
module ecc_decoder
  import ecc_pkg::*;
#(
  parameter int unsigned               NUM_TE   = NUM_TE_DEFAULT,
  parameter logic [NUM_TE-1:0][N-1:0]  TE_MASKS = TE_MASKS_DEFAULT
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  cw_t       encoded,
  // stage 1 outputs
  output logic      det_valid,
  output syn_t      syndrome,
  output logic      err_detected,
  // stage 2 outputs
  output logic      out_valid,
  output data_t     corrected,
  output err_type_e etype,
  output logic      se,
  output logic      de,
  output logic      dae,
  output logic      te,
  output logic      ue
);

  syn_t      syn_d;
  cw_t       cw_q;
  cw_t       corr_vec;
  cw_t       cw_fixed;
  err_type_e etype_d;
  logic      se_d, de_d, dae_d, te_d, ue_d;

  ecc_syndrome_gen u_syndrome_gen (
    .codeword (encoded),
    .syndrome (syn_d)
  );

  // stage 1 registers
  always_ff @(posedge clk) begin
    if (!rst_n) det_valid <= 1'b0;
    else        det_valid <= in_valid;
    if (in_valid) begin
      cw_q     <= encoded;
      syndrome <= syn_d;
    end
  end

  assign err_detected = |syndrome;

  ecc_error_corrector #(
    .NUM_TE   (NUM_TE),
    .TE_MASKS (TE_MASKS)
  ) u_error_corrector (
    .syndrome   (syndrome),
    .correction (corr_vec),
    .etype      (etype_d),
    .se         (se_d),
    .de         (de_d),
    .dae        (dae_d),
    .te         (te_d),
    .ue         (ue_d)
  );

  assign cw_fixed = cw_q ^ corr_vec;

  // stage 2 registers
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= det_valid;
    if (det_valid) begin
      corrected <= cw_fixed[N-1:R];
      etype     <= etype_d;
      se        <= se_d;
      de        <= de_d;
      dae       <= dae_d;
      te        <= te_d;
      ue        <= ue_d;
    end
  end

  // At most one error class is reported for a word.
  a_onehot_class : assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $onehot0({se, de, dae, te, ue}));

endmodule
