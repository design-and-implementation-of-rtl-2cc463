// ecc_pkg: shared types and constants of the (14,8) SEC-DED-DAEC-STEC code.
//
// Bit numbering used throughout: a codeword is logic [13:0] where index i-1
// holds codeword bit i (i = 1..14). Bits 14..7 carry data d8..d1 and bits 6..1
// carry parity p1..p6, so that the syndrome equations of the code read
// directly as XORs of codeword bits. A 6-bit syndrome is logic [5:0] whose
// index k-1 holds the check that covers codeword bit k (k = 1..6); that is
// syndrome = {s1,s2,s3,s4,s5,s6}, the left-to-right order of the syndrome
// lookup table. The same order is used for the parity field:
// parity = {p1,p2,p3,p4,p5,p6} = codeword[5:0].
//
// H_COL gives the syndrome of a single error at each codeword bit; it is the
// column set implied by the encoder and syndrome equations. build_lut() turns
// it into the 64-entry syndrome lookup table of the decoder at elaboration
// time: the table holds every single-bit error, every adjacent double-bit
// error and a selected list of triple-bit patterns, keeping a triple only
// where its syndrome is not already taken by a single or adjacent double.
package ecc_pkg;

  localparam int unsigned K = 8;   // information bits
  localparam int unsigned R = 6;   // parity / syndrome bits
  localparam int unsigned N = 14;  // codeword length

  typedef logic [K-1:0] data_t;
  typedef logic [R-1:0] syn_t;
  typedef logic [N-1:0] cw_t;

  // Error classes reported by the decoder.
  typedef enum logic [2:0] {
    ERR_NONE = 3'd0,  // syndrome zero
    ERR_SE   = 3'd1,  // single error, corrected
    ERR_DE   = 3'd2,  // double (non-adjacent) error, detected only
    ERR_DAE  = 3'd3,  // double adjacent error, corrected
    ERR_TE   = 3'd4,  // selected triple error, corrected
    ERR_UE   = 3'd5   // anything else, flagged uncorrectable
  } err_type_e;

  typedef struct packed {
    err_type_e etype;
    cw_t       corr;   // correction vector, XORed onto the received codeword
  } lut_entry_t;

  typedef lut_entry_t [2**R-1:0] lut_t;

  // Syndrome of a single error at codeword bit i (index i-1).
  // Bits 1..6 (parity p6..p1) map to one syndrome bit each; bits 7..14
  // (data d1..d8) map to weight-3 columns taken from the parity equations.
  localparam syn_t H_COL [N] = '{
    6'b000001, 6'b000010, 6'b000100, 6'b001000, 6'b010000, 6'b100000,  // bits 1..6
    6'b001101,  // bit 7,  d1: s3 s4 s6
    6'b111000,  // bit 8,  d2: s1 s2 s3
    6'b100101,  // bit 9,  d3: s1 s4 s6
    6'b011001,  // bit 10, d4: s2 s3 s6
    6'b010110,  // bit 11, d5: s2 s4 s5
    6'b110001,  // bit 12, d6: s1 s2 s6
    6'b011010,  // bit 13, d7: s2 s3 s5
    6'b101100   // bit 14, d8: s1 s3 s4
  };

  // Default list of selected triple-bit patterns, as codeword-bit masks:
  // bits (1,4,7), (2,5,8) and (1,3,6).
  localparam int unsigned NUM_TE_DEFAULT = 3;
  localparam logic [NUM_TE_DEFAULT-1:0][N-1:0] TE_MASKS_DEFAULT = {
    14'b00_0000_0010_0101,  // bits 1,3,6
    14'b00_0000_1001_0010,  // bits 2,5,8
    14'b00_0000_0100_1001   // bits 1,4,7
  };

  // Largest number of selected triple patterns the table builder accepts.
  localparam int unsigned MAX_TE = 8;

  // Syndrome of an arbitrary error pattern.
  function automatic syn_t syndrome_of(input cw_t e);
    syn_t s = '0;
    for (int i = 0; i < N; i++)
      if (e[i]) s ^= H_COL[i];
    return s;
  endfunction

  // Build the syndrome lookup table. Entries are written from the lowest
  // priority class to the highest so that a single error always wins a
  // collision, then an adjacent double; a triple pattern only keeps a
  // syndrome nobody else claims. Unclaimed non-zero syndromes are DE when of
  // even weight (every column has odd weight, so two errors give an even
  // syndrome) and UE when of odd weight.
  function automatic lut_t build_lut(input int unsigned num_te,
                                     input logic [MAX_TE-1:0][N-1:0] te_masks);
    lut_t t;
    logic [2**R-1:0] taken;
    for (int s = 0; s < 2**R; s++) begin
      t[s].corr  = '0;
      t[s].etype = (s == 0) ? ERR_NONE : (($countones(s) % 2) == 0 ? ERR_DE : ERR_UE);
    end
    taken    = '0;
    taken[0] = 1'b1;
    // singles
    for (int i = 0; i < N; i++) begin
      t[H_COL[i]].etype = ERR_SE;
      t[H_COL[i]].corr  = cw_t'(1) << i;
      taken[H_COL[i]]   = 1'b1;
    end
    // adjacent doubles (i, i+1)
    for (int i = 0; i < N-1; i++) begin
      syn_t s2 = H_COL[i] ^ H_COL[i+1];
      if (!taken[s2]) begin
        t[s2].etype = ERR_DAE;
        t[s2].corr  = cw_t'(3) << i;
        taken[s2]   = 1'b1;
      end
    end
    // selected triples
    for (int j = 0; j < MAX_TE; j++) begin
      if (j < num_te) begin
        syn_t s3 = syndrome_of(te_masks[j]);
        if (!taken[s3]) begin
          t[s3].etype = ERR_TE;
          t[s3].corr  = te_masks[j];
          taken[s3]   = 1'b1;
        end
      end
    end
    return t;
  endfunction

endpackage
