// hrng_spc_bm: serial-to-parallel converter (SPC) and N-bit buffer memory (BM).
//
// A single pulse on sync is delayed by m*TD cycles, m = 0..N-1; each delayed
// copy scans the serial bit stream on in1 at that moment and, if the bit is 1,
// sets S-R flip-flop m. After N*TD cycles word holds the N bits of one window,
// word[0] being the first bit sampled (TRN1). The pulse delayed by (N+1)*TD
// clears all flip-flops, which empties the buffer for the next window. This is
// the delay-line / AND / S-R structure of the reference design, with its
// z^-1..z^-7 and z^-9 delays generalised to multiples of TD.
//
// Timing: a flip-flop sets at the edge ending the scan cycle; the word is
// complete from cycle (N-1)*TD + 1 after the pulse and is cleared at the edge
// ending cycle (N+1)*TD. If set and clear coincide the clear wins (this
// design's choice; it does not happen in normal operation).
module hrng_spc_bm #(
  parameter int unsigned N  = hrng_pkg::N_BITS,
  parameter int unsigned TD = hrng_pkg::TD_CYC
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sync,
  input  logic         in1,
  output logic [N-1:0] word
);

  localparam int unsigned DL = (N + 1) * TD;   // delay line length

  // dly[k] is the single pulse delayed by k+1 cycles.
  logic [DL-1:0] dly;
  logic [N-1:0]  scan;
  logic          clr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dly <= '0;
    else        dly <= {dly[DL-2:0], sync};
  end

  always_comb begin
    scan[0] = sync;
    for (int m = 1; m < N; m++) scan[m] = dly[m*TD - 1];
    clr = dly[DL-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   word <= '0;
    else if (clr) word <= '0;
    else          word <= word | (scan & {N{in1}});
  end

endmodule
