// ecc_parity_gen: parity generation unit of the (14,8) SEC-DED-DAEC-STEC code.
//
// A pure XOR network that computes the six parity bits from the eight data
// bits. The equations are the code's own:
//   p1 = d8^d6^d3^d2        p2 = d7^d6^d5^d4^d2    p3 = d8^d7^d4^d2^d1
//   p4 = d8^d5^d3^d1        p5 = d7^d5             p6 = d6^d4^d3^d1
// Interface: data[i-1] = d_i; parity = {p1,p2,p3,p4,p5,p6}, the order in
// which the parity field sits in codeword bits 6..1 (see ecc_pkg).
// Timing: combinational, no clock.
module ecc_parity_gen
  import ecc_pkg::*;
(
  input  data_t data,
  output syn_t  parity
);

  logic d1, d2, d3, d4, d5, d6, d7, d8;
  assign {d8, d7, d6, d5, d4, d3, d2, d1} = data;

  assign parity[5] = d8 ^ d6 ^ d3 ^ d2;            // p1
  assign parity[4] = d7 ^ d6 ^ d5 ^ d4 ^ d2;       // p2
  assign parity[3] = d8 ^ d7 ^ d4 ^ d2 ^ d1;       // p3
  assign parity[2] = d8 ^ d5 ^ d3 ^ d1;            // p4
  assign parity[1] = d7 ^ d5;                      // p5
  assign parity[0] = d6 ^ d4 ^ d3 ^ d1;            // p6

endmodule
