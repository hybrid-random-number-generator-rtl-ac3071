// hrng_sampler: sampler (SM), a zero-order hold of the amplified noise.
//
// At every clock edge that ends a strobe cycle it stores the signed noise
// amplitude and holds it until the next strobe, so the output is a staircase
// of T_d-wide steps with random heights (the "Disc Out" signal). The output
// changes one cycle after the strobe. The noise arrives digitised as an AW-bit
// two's-complement number: the real part is an analog sample-and-hold, and
// the width is this design's choice.
module hrng_sampler #(
  parameter int unsigned AW = hrng_pkg::AW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 strobe,
  input  logic signed [AW-1:0] noise_in,
  output logic signed [AW-1:0] disc_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      disc_out <= '0;
    else if (strobe) disc_out <= noise_in;
  end

endmodule
