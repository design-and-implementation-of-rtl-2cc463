// ecc_error_corrector: error localization and correction unit.
//
// Looks the 6-bit syndrome up in a 64-entry table and returns the error class
// and the correction vector to XOR onto the received codeword. The table is
// a constant built at elaboration by ecc_pkg::build_lut from the code's
// single-error syndromes: all 14 single errors (SE), all 13 adjacent double
// errors (DAE) and the selected triple patterns in TE_MASKS (TE) whose
// syndrome is not already used by an SE or DAE entry. Any other non-zero
// syndrome gives a zero correction and is flagged: DE for an even-weight
// syndrome (two non-adjacent errors, detected only), UE for an odd one.
//
// Which error classes exist and that they are decoded by syndrome lookup is
// the code's own; the rule that resolves syndrome collisions (SE before DAE
// before TE) and the DE/UE split by syndrome weight are this design's. With
// the default triples only (2,5,8) gets a syndrome of its own: (1,4,7) has
// the syndrome of a bit-3 error and (1,3,6) that of a bit-9 error, so those
// two are corrected as single errors.
// Interface: one-hot class flags se/de/dae/te/ue (all low for no error) plus
// the same class as an enum. Timing: combinational.
module ecc_error_corrector
  import ecc_pkg::*;
#(
  parameter int unsigned               NUM_TE   = NUM_TE_DEFAULT,
  parameter logic [NUM_TE-1:0][N-1:0]  TE_MASKS = TE_MASKS_DEFAULT
) (
  input  syn_t      syndrome,
  output cw_t       correction,
  output err_type_e etype,
  output logic      se,
  output logic      de,
  output logic      dae,
  output logic      te,
  output logic      ue
);

  localparam lut_t LUT = build_lut(NUM_TE, (MAX_TE*N)'(TE_MASKS));

  lut_entry_t entry;

  always_comb begin
    entry      = LUT[syndrome];
    correction = entry.corr;
    etype      = entry.etype;
    se         = (entry.etype == ERR_SE);
    de         = (entry.etype == ERR_DE);
    dae        = (entry.etype == ERR_DAE);
    te         = (entry.etype == ERR_TE);
    ue         = (entry.etype == ERR_UE);
  end

  initial begin
    assert (NUM_TE <= MAX_TE) else $error("NUM_TE exceeds MAX_TE");
  end

endmodule
