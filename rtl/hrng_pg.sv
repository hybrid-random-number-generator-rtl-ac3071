// hrng_pg: pulse generator (PG) that times the noise sampler.
//
// While the gate (the synchronizer clock pulse) is high, issues a one-cycle
// sampling strobe every TD cycles, the first one in the first cycle of the
// gate; it is started by the front of the clock pulse and stopped by its
// cutoff, as in the reference design. The strobe width tau_d is one cycle,
// which the reference allows (tau_d <= T_d, arbitrarily small); that width is
// this design's choice. A phase counter restarts whenever the gate is low.
module hrng_pg #(
  parameter int unsigned TD = hrng_pkg::TD_CYC
) (
  input  logic clk,
  input  logic rst_n,
  input  logic gate,
  output logic strobe
);

  localparam int unsigned PW = (TD > 1) ? $clog2(TD) : 1;

  logic [PW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      phase <= '0;
    else if (!gate)                  phase <= '0;
    else if (phase == PW'(TD - 1))   phase <= '0;
    else                             phase <= phase + 1'b1;
  end

  assign strobe = gate && (phase == '0);

endmodule
