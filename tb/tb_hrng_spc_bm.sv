// tb_hrng_spc_bm: self-checking testbench of the serial-to-parallel converter
// and buffer memory.
//
// A TD = 1 and a TD = 2 instance (N = 8) see the same single pulse and the
// same random serial stream. For each trial the pulse comes in cycle 0; in
// cycle c the word must hold bit m = stream[m*TD] for every m with m*TD < c,
// zeros elsewhere, and must be all zero from cycle (N+1)*TD + 1 on. The
// first two trials use the two words of the reference run, 10110010 and
// 01001100 (first bit first).
module tb_hrng_spc_bm;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic sync = 1'b0, in1 = 1'b0;
  logic [N-1:0] w1, w2;
  hrng_spc_bm           dut1 (.clk, .rst_n, .sync, .in1, .word(w1));
  hrng_spc_bm #(.TD(2)) dut2 (.clk, .rst_n, .sync, .in1, .word(w2));

  function automatic logic [N-1:0] expect_word(logic stream[64], int td, int c);
    logic [N-1:0] e = '0;
    if (c > (N + 1) * td) return '0;
    for (int m = 0; m < N; m++)
      if (m * td < c) e[m] = stream[m * td];
    return e;
  endfunction

  task automatic chk(logic [N-1:0] got, logic [N-1:0] exp, string what, int t, int c);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s trial %0d cycle %0d: got %b exp %b", what, t, c, got, exp);
    end
  endtask

  int full_words = 0;
  initial begin
    logic stream[64];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      logic [N-1:0] fixed;
      fixed = (t == 0) ? 8'b01001101 : 8'b00110010;  // "10110010", "01001100", bit 0 first
      for (int c = 0; c < 64; c++) stream[c] = 1'($urandom);
      if (t < 2) for (int m = 0; m < N; m++) stream[m] = fixed[m];
      for (int c = 0; c < 2 * (N + 1) + 4; c++) begin
        sync = (c == 0);
        in1  = stream[c];
        #1;
        chk(w1, expect_word(stream, 1, c), "TD=1", t, c);
        chk(w2, expect_word(stream, 2, c), "TD=2", t, c);
        if (c == N && t < 2) begin
          checks++;
          if (w1 != fixed) begin failures++; $display("FAIL reference word %0d: %b", t, w1); end
          full_words++;
        end
        @(negedge clk);
      end
      sync = 1'b0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
