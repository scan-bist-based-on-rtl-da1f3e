// sbist_pkg: types and constants shared by the scan-BIST pattern source.
//
// The test session has three stages: pseudorandom patterns straight from the
// LFSR, semirandom patterns (a randomly chosen stored sequence per group with
// a few randomly flipped bits) and deterministic patterns. The deterministic
// stage exists in two forms: decoding of an encoded bit stream against the
// stored sequences, or LFSR reseeding. The 2-bit Stage input selects one of
// them; its encoding (below) is this design's choice.
package sbist_pkg;

  typedef enum logic [1:0] {
    STAGE_PSEUDO = 2'd0,  // stage 1: LFSR -> scan chains
    STAGE_SEMI   = 2'd1,  // stage 2: ROM sequence XOR Flip_indication_R
    STAGE_DECODE = 2'd2,  // stage 3: ROM sequence XOR Flip_indication_D
    STAGE_RESEED = 2'd3   // stage 3 alternative: serial seed, then LFSR
  } stage_e;

  // Width of an index that must hold values 0..n-1 (at least 1 bit).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Width of a field that holds values 0..n-1 (0 bits when n == 1).
  function automatic int unsigned field_w(input int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage
