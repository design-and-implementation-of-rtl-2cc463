// ecc_encoder: encoder block of the (14,8) SEC-DED-DAEC-STEC code.
//
// Appends the six parity bits from ecc_parity_gen to the eight data bits and
// registers the resulting 14-bit codeword, {d8..d1, p1..p6} in codeword bits
// 14..1 (see ecc_pkg for the numbering). The code and the codeword layout
// follow the code's encoder and syndrome equations; the output register and
// the valid/reset handshake are this design's choice.
// Interface: in_valid/data are sampled on the rising clock edge; encoded and
// out_valid appear one cycle later. rst_n (active low, synchronous) clears
// only out_valid; the data register is not reset.
module ecc_encoder
  import ecc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t data,
  output logic  out_valid,
  output cw_t   encoded
);

  syn_t parity;

  ecc_parity_gen u_parity_gen (
    .data   (data),
    .parity (parity)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (in_valid) encoded <= {data, parity};
  end

endmodule
