// vppm_pkg: constants shared by the VPPM modulator blocks.
//
// A VPPM symbol is N_T samples long (the codeword length). The default,
// VPPM_NT = 10, is a 10 % dimming step: dimming levels 0..10, where 10 is
// full brightness. Levels and sample indices are carried on
// vppm_width(N_T) = ceil(log2(N_T + 1)) bits, so that the value N_T itself
// fits; this gives 2, 3, 4, 5, 5, 6, 6, 7, 7 bits for codeword lengths
// 3, 5, 10, 20, 30, 40, 50, 80, 100.
package vppm_pkg;

  // Default codeword length (samples per symbol) = 100 % / dimming step.
  localparam int unsigned VPPM_NT = 10;

  // Bits needed to hold a dimming level or sample index in 0..nt.
  function automatic int unsigned vppm_width(input int unsigned nt);
    return $clog2(nt + 1);
  endfunction

endpackage
