// hrng_solver: solver (SL), a threshold device with a random threshold.
//
// Models how a TTL input reads a level inside its uncertainty zone randomly
// as 0 or 1. The held noise sample and a random threshold amplitude are
// added; a positive sum gives 1, anything else 0 (negative pulses are cut
// off), and the result is passed only while the clock pulse is high. This is
// the Sum / Compare-To-Constant(> 0) / AND chain of the reference design. The
// sum is one bit wider than the inputs so it cannot overflow. Purely
// combinational.
module hrng_solver #(
  parameter int unsigned AW = hrng_pkg::AW
) (
  input  logic signed [AW-1:0] sample,
  input  logic signed [AW-1:0] thr_noise,
  input  logic                 sync,
  output logic                 trn_bit
);

  logic signed [AW:0] sum;

  always_comb begin
    sum     = (AW+1)'(sample) + (AW+1)'(thr_noise);
    trn_bit = sync && (sum > 0);
  end

endmodule
