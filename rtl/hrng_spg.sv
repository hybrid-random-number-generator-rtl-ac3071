// hrng_spg: single pulse generator (SPG).
//
// Turns the front of the synchronizer clock pulse into one pulse of one
// cycle, however long the clock pulse lasts; that pulse starts the serial-to-
// parallel conversion. The gate structure is the reference design's:
//   a    = in1 AND NOT a(t-1)
//   out1 = a   AND NOT in1(t-1)
// with two one-cycle delay registers. out1 is combinational from in1 and is
// high in the first cycle in which in1 is high after being low.
module hrng_spg (
  input  logic clk,
  input  logic rst_n,
  input  logic in1,
  output logic out1
);

  logic a, a_q, in1_q;

  always_comb begin
    a    = in1 && !a_q;
    out1 = a && !in1_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= 1'b0;
      in1_q <= 1'b0;
    end else begin
      a_q   <= a;
      in1_q <= in1;
    end
  end

endmodule
