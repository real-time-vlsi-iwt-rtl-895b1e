// iwt_pkg: constants and helpers shared by the real-time (5/3) integer wavelet
// denoiser.
//
// The default sizes are those of the design: 8-bit two's complement input
// samples, an 11-bit (b+3) internal word, and five decomposition levels.
// delay_units() gives the length of the detail delay line of level j in a
// J-level tandem, D_j = 4(2^(J-j) - 1), counted in samples of level j.
// For J = 5 it yields 60, 28, 12, 4, 0 for j = 1..5, and 124 for j = 0, which
// is the end-to-end latency in input samples.
package iwt_pkg;

  localparam int unsigned DEF_B = 8;   // input sample width (bits)
  localparam int unsigned DEF_W = 11;  // internal word width, B + 3
  localparam int unsigned DEF_J = 5;   // decomposition levels

  // Normalised delay units D_j = 4 * (2^(J-j) - 1).
  function automatic int unsigned delay_units(int unsigned j, int unsigned levels);
    return 4 * ((1 << (levels - j)) - 1);
  endfunction

endpackage
