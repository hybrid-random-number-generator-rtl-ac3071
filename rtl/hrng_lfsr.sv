// hrng_lfsr: N-bit Fibonacci LFSR with parallel reseed and enable.
//
// Stage 1 (state[0]) takes the XOR of the tapped stages; every other stage
// takes its predecessor; the output out1 is the last stage. The default taps,
// stages 2, 3, 4 and 8, give x^8 + x^4 + x^3 + x^2 + 1, a primitive
// polynomial, so a non-zero seed gives a period of 255.
//
// Reseed: the sync input is the synchronizer clock pulse. A register holds it
// delayed by one cycle; in the cycle where that copy is 1 and sync is 0 (the
// cutoff of the clock pulse) the stages load seed, seed[k] into stage k+1,
// instead of shifting. The load shows in state from the next cycle. When en is
// 0 the stages hold (seed loads included); the sync delay register always
// runs. An all-zero seed keeps the register at zero until the next reseed.
// The structure, taps and load-on-falling-edge follow the reference design;
// the one-cycle visibility of the load is this design's.
module hrng_lfsr #(
  parameter int unsigned     N    = hrng_pkg::N_BITS,
  parameter logic [N-1:0]    TAPS = N'(hrng_pkg::LFSR8_TAPS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sync,
  input  logic [N-1:0] seed,
  output logic [N-1:0] state,
  output logic         out1
);

  logic sync_q;
  logic load;
  logic fb;

  always_comb begin
    load = sync_q && !sync;
    fb   = ^(state & TAPS);
    out1 = state[N-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= 1'b0;
    else        sync_q <= sync;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (en) begin
      if (load)     state <= seed;
      else          state <= {state[N-2:0], fb};
    end
  end

endmodule
