// hrng_pkg: shared constants of the hybrid random number generator.
//
// The generator samples amplified Zener-diode noise, turns each sample into
// a bit with a randomly moving threshold (the uncertainty zone of a TTL
// input), collects N such bits into a buffer and uses them as the seed of a
// pseudo-random generator built from three 8-bit LFSRs. One clock cycle is
// one time unit: the sampling period T_d and the LFSR clock period T_LFSR
// are both one cycle in the default configuration.
//
// The numbers N = 8, T_d = 1, Delta = 50 (so T_s = 50 and tau_s = 8), the
// 16-bit password and the feedback taps follow the reference design. The
// amplitude width AW of the digitised noise is this design's own choice.
package hrng_pkg;

  // Bits per true-random word (buffer memory size, LFSR length).
  localparam int unsigned N_BITS = 8;
  // Sampling period T_d in clock cycles.
  localparam int unsigned TD_CYC = 1;
  // Number of PRNG outputs per synchronizer period (Delta); with
  // T_LFSR = 1 cycle this is also the period T_s in cycles.
  localparam int unsigned DELTA = 50;
  // Width of the static user password.
  localparam int unsigned PW_BITS = 16;
  // Width of a signed noise or threshold amplitude.
  localparam int unsigned AW = 8;

  // Feedback taps of the 8-bit Fibonacci LFSR: stages 2, 3, 4 and 8
  // (bit 0 is stage 1), polynomial x^8 + x^4 + x^3 + x^2 + 1.
  localparam logic [7:0] LFSR8_TAPS = 8'b1000_1110;

endpackage
