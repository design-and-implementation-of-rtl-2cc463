// ecc_ref_pkg: reference model of the (14,8) SEC-DED-DAEC-STEC code for the
// testbenches. It is written from the parity equations only, in a different
// form from the RTL: each parity bit is the XOR of the data bits selected by
// a mask, the syndrome is the received parity XOR the parity recomputed from
// the received data, and the expected decoder action is found by searching
// error patterns (single, then adjacent double, then the selected triples)
// rather than through a lookup table.
// Codeword layout as in the RTL: bits 14..7 = d8..d1, bits 6..1 = p1..p6.
package ecc_ref_pkg;

  // class codes, same order as ecc_pkg::err_type_e
  localparam int C_NE = 0, C_SE = 1, C_DE = 2, C_DAE = 3, C_TE = 4, C_UE = 5;

  // data-bit masks of p1..p6 (bit i-1 = d_i)
  localparam logic [7:0] PMASK [6] = '{8'hA6, 8'h7A, 8'hCB, 8'h95, 8'h50, 8'h2D};

  // selected triple patterns, as codeword bit positions (1-based)
  localparam int TRIPLE [3][3] = '{'{1, 4, 7}, '{2, 5, 8}, '{1, 3, 6}};

  function automatic logic [5:0] ref_parity(input logic [7:0] d);
    logic [5:0] p;
    for (int j = 0; j < 6; j++) p[5-j] = ^(d & PMASK[j]);  // p1 is the MSB
    return p;
  endfunction

  function automatic logic [13:0] ref_encode(input logic [7:0] d);
    return {d, ref_parity(d)};
  endfunction

  function automatic logic [5:0] ref_syndrome(input logic [13:0] r);
    return r[5:0] ^ ref_parity(r[13:6]);
  endfunction

  function automatic logic [13:0] bit_at(input int pos);  // 1-based
    return 14'(1) << (pos - 1);
  endfunction

  // Expected class and correction vector for a syndrome.
  function automatic void ref_classify(input logic [5:0] s, output int cls,
                                       output logic [13:0] corr);
    corr = '0;
    if (s == 0) begin cls = C_NE; return; end
    for (int i = 1; i <= 14; i++)
      if (ref_syndrome(bit_at(i)) == s) begin cls = C_SE; corr = bit_at(i); return; end
    for (int i = 1; i <= 13; i++)
      if (ref_syndrome(bit_at(i) | bit_at(i+1)) == s) begin
        cls = C_DAE; corr = bit_at(i) | bit_at(i+1); return;
      end
    for (int t = 0; t < 3; t++) begin
      logic [13:0] m = bit_at(TRIPLE[t][0]) | bit_at(TRIPLE[t][1]) | bit_at(TRIPLE[t][2]);
      if (ref_syndrome(m) == s) begin cls = C_TE; corr = m; return; end
    end
    cls = ($countones(s) % 2 == 0) ? C_DE : C_UE;
  endfunction

  // A random error mask with exactly w bits set.
  function automatic logic [13:0] rand_mask(input int w);
    logic [13:0] m = '0;
    while ($countones(m) < w) m[$urandom_range(13, 0)] = 1'b1;
    return m;
  endfunction

endpackage
