// hrng_top: hybrid random number generator with two entropy sources.
//
// External entropy: Zener-diode breakdown noise, amplified and digitised,
// arrives on noise_in. Internal entropy: the random reading of a TTL input
// inside its uncertainty zone, modelled as a random threshold amplitude on
// thr_noise. Both are analog in a real build; here they are signed AW-bit
// numbers supplied from outside.
//
// Data path (one clock cycle = one time unit):
//   SN  (hrng_sync)    clock pulse, high TAU_S = N*TD cycles of every TS cycles
//   PG  (hrng_pg)      sampling strobe every TD cycles while the pulse is high
//   SM  (hrng_sampler) holds the noise amplitude at each strobe (disc_out)
//   SL  (hrng_solver)  sample + threshold > 0, gated by the pulse (trn_bit)
//   SPG (hrng_spg)     one-cycle pulse at the front of the clock pulse
//   SPC/BM (hrng_spc_bm) scans N bits into an N-bit buffer (trn_word)
//   PRNG (hrng_prng)   three LFSRs; reseeded with trn_word and the password at
//                      the cutoff of the clock pulse, then free running (rn)
// Every TS cycles the TRNG fills one N-bit word during the first TAU_S cycles
// and the PRNG is reseeded with it; for the remaining TS - TAU_S cycles only
// the PRNG works, giving the noise source time to decorrelate. The PRNG also
// runs during the window, from its previous seed.
//
// Timing: the sampler register delays the sampled data by one cycle, so the
// solver gate and the SPG take the clock pulse delayed by one cycle, and the
// PRNG takes it delayed by two so that its reseed edge (cycle TAU_S+2 of the
// period) falls while the buffer is full. The buffer is cleared one edge
// later at the earliest. reseed marks the cycle whose closing edge loads the
// seeds; the new sequence appears on rn from the next cycle. step_trn and
// step_pw1 show which PRNG register the controller LFSR lets step. The alignment
// delays are this design's; the rest follows the reference design.
module hrng_top #(
  parameter int unsigned N     = hrng_pkg::N_BITS,
  parameter int unsigned TD    = hrng_pkg::TD_CYC,
  parameter int unsigned DELTA = hrng_pkg::DELTA,
  parameter int unsigned AW    = hrng_pkg::AW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [AW-1:0] noise_in,
  input  logic signed [AW-1:0] thr_noise,
  input  logic [2*N-1:0]       password,
  output logic                 rn,
  output logic                 clk_pulse,
  output logic signed [AW-1:0] disc_out,
  output logic                 trn_bit,
  output logic [N-1:0]         trn_word,
  output logic                 reseed,
  output logic                 step_trn,
  output logic                 step_pw1
);

  localparam int unsigned TAU_S = N * TD;
  localparam int unsigned TS    = DELTA;   // T_s = Delta * T_LFSR, T_LFSR = 1 cycle

  logic pulse_d1, pulse_d2, pulse_d3;
  logic strobe, single;

  hrng_sync #(.TS(TS), .TAU_S(TAU_S)) u_sn (
    .clk, .rst_n, .clk_pulse, .clk_pulse_d1(pulse_d1), .clk_pulse_d2(pulse_d2)
  );

  hrng_pg #(.TD(TD)) u_pg (
    .clk, .rst_n, .gate(clk_pulse), .strobe
  );

  hrng_sampler #(.AW(AW)) u_sm (
    .clk, .rst_n, .strobe, .noise_in, .disc_out
  );

  hrng_solver #(.AW(AW)) u_sl (
    .sample(disc_out), .thr_noise, .sync(pulse_d1), .trn_bit
  );

  hrng_spg u_spg (
    .clk, .rst_n, .in1(pulse_d1), .out1(single)
  );

  hrng_spc_bm #(.N(N), .TD(TD)) u_spc_bm (
    .clk, .rst_n, .sync(single), .in1(trn_bit), .word(trn_word)
  );

  hrng_prng #(.N(N), .PW(2*N)) u_prng (
    .clk, .rst_n, .trn(trn_word), .password, .sync(pulse_d2),
    .rn, .en_trn(step_trn), .en_pw1(step_pw1)
  );

  // Observation copy of the reseed condition inside the LFSRs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pulse_d3 <= 1'b0;
    else        pulse_d3 <= pulse_d2;
  end
  assign reseed = pulse_d3 && !pulse_d2;

  initial begin
    assert (DELTA <= (2**N) - 1) else $error("hrng_top: Delta must not exceed 2^N - 1");
    assert (TAU_S < TS) else $error("hrng_top: N*TD must be below Delta");
  end

endmodule
