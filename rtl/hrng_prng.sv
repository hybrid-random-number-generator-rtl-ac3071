// hrng_prng: pseudo-random part of the generator, three LFSRs combined.
//
// lfsr_trn is seeded with the true-random word TRN1..TRN8, lfsr_pw1 with
// password bits IN1..IN8 and lfsr_pw2 with IN9..IN16. lfsr_pw2 runs every
// cycle and acts as the clock controller: when its output is 0, lfsr_trn
// steps; when it is 1, lfsr_pw1 steps. The output bit rn is the XOR of the
// outputs of lfsr_trn and lfsr_pw1 (an alternating-step arrangement). All
// three reload their seeds at the cutoff of the sync pulse; the sync delayed
// by one cycle is ORed into both controlled enables so that both are enabled
// in the cycle of the cutoff and take their seeds. All of this is the
// reference design's wiring; only the cycle-level timing of the load is this
// design's (see hrng_lfsr).
//
// en_trn and en_pw1 bring out the two controlled enables for observation.
module hrng_prng #(
  parameter int unsigned N  = hrng_pkg::N_BITS,
  parameter int unsigned PW = hrng_pkg::PW_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  trn,
  input  logic [PW-1:0] password,
  input  logic          sync,
  output logic          rn,
  output logic          en_trn,
  output logic          en_pw1
);

  logic          sync_q;
  logic          out_trn, out_pw1, out_pw2;
  logic [N-1:0]  st_trn, st_pw1, st_pw2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= 1'b0;
    else        sync_q <= sync;
  end

  always_comb begin
    en_trn = sync_q || !out_pw2;
    en_pw1 = sync_q ||  out_pw2;
    rn     = out_trn ^ out_pw1;
  end

  hrng_lfsr #(.N(N)) u_lfsr_trn (
    .clk, .rst_n, .en(en_trn), .sync, .seed(trn),
    .state(st_trn), .out1(out_trn)
  );

  hrng_lfsr #(.N(N)) u_lfsr_pw1 (
    .clk, .rst_n, .en(en_pw1), .sync, .seed(password[N-1:0]),
    .state(st_pw1), .out1(out_pw1)
  );

  hrng_lfsr #(.N(N)) u_lfsr_pw2 (
    .clk, .rst_n, .en(1'b1), .sync, .seed(password[2*N-1:N]),
    .state(st_pw2), .out1(out_pw2)
  );

  initial begin
    assert (PW == 2 * N) else $error("hrng_prng: password must be 2*N bits");
  end

endmodule
