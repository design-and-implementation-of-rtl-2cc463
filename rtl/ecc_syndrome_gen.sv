// ecc_syndrome_gen: syndrome generator of the (14,8) SEC-DED-DAEC-STEC code.
//
// Recomputes each parity check over the received 14-bit codeword:
//   s1 = c14^c12^c9^c8^c6        s2 = c13^c12^c11^c10^c8^c5
//   s3 = c14^c13^c10^c8^c7^c4    s4 = c14^c11^c9^c7^c3
//   s5 = c13^c11^c2              s6 = c12^c10^c9^c7^c1
// where c_i is codeword bit i (index i-1). A zero syndrome means no error
// was seen. These are the code's own equations.
// Interface: syndrome = {s1,s2,s3,s4,s5,s6}, so syndrome[k-1] is the check
// that holds codeword bit k alone among bits 1..6.
// Timing: combinational, no clock.
module ecc_syndrome_gen
  import ecc_pkg::*;
(
  input  cw_t  codeword,
  output syn_t syndrome
);

  logic [14:1] c;
  assign c = codeword;

  assign syndrome[5] = c[14] ^ c[12] ^ c[9]  ^ c[8]  ^ c[6];          // s1
  assign syndrome[4] = c[13] ^ c[12] ^ c[11] ^ c[10] ^ c[8] ^ c[5];   // s2
  assign syndrome[3] = c[14] ^ c[13] ^ c[10] ^ c[8]  ^ c[7] ^ c[4];   // s3
  assign syndrome[2] = c[14] ^ c[11] ^ c[9]  ^ c[7]  ^ c[3];          // s4
  assign syndrome[1] = c[13] ^ c[11] ^ c[2];                          // s5
  assign syndrome[0] = c[12] ^ c[10] ^ c[9]  ^ c[7]  ^ c[1];          // s6

endmodule
