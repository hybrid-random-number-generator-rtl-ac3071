// hrng_sync: synchronizer (SN) of the hybrid random number generator.
//
// Produces the periodic clock pulse that paces the whole generator. The
// pulse is high for TAU_S cycles at the start of every TS-cycle period; while
// it is high the true-random front end samples noise, and its falling edge
// (the "cutoff") hands the collected word to the PRNG as a new seed. The
// default TAU_S = N * T_d = 8 and TS = Delta * T_LFSR = 50 are the reference
// numbers from relation (1).
//
// Implementation: a modulo-TS counter, cleared by reset, so the first period
// starts in the first cycle after reset. clk_pulse is a decode of the counter
// (registered through the counter, glitch free). clk_pulse_d1/_d2 are the same
// pulse delayed by one and two cycles; they are this design's own addition,
// used to line the pulse up with the registered sampler and with the PRNG
// seed load.
module hrng_sync #(
  parameter int unsigned TS    = hrng_pkg::DELTA,
  parameter int unsigned TAU_S = hrng_pkg::N_BITS * hrng_pkg::TD_CYC
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_pulse,
  output logic clk_pulse_d1,
  output logic clk_pulse_d2
);

  localparam int unsigned CW = (TS > 1) ? $clog2(TS) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    cnt <= '0;
    else if (cnt == CW'(TS - 1))   cnt <= '0;
    else                           cnt <= cnt + 1'b1;
  end

  assign clk_pulse = (cnt < CW'(TAU_S));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_pulse_d1 <= 1'b0;
      clk_pulse_d2 <= 1'b0;
    end else begin
      clk_pulse_d1 <= clk_pulse;
      clk_pulse_d2 <= clk_pulse_d1;
    end
  end

  initial begin
    assert (TAU_S > 0 && TAU_S < TS)
      else $error("hrng_sync: need 0 < TAU_S < TS");
  end

endmodule
