// tb_hrng_sync: self-checking testbench of the synchronizer.
//
// Two instances: the default one (T_s = 50, tau_s = 8) and a small one
// (TS = 7, TAU_S = 3). From the first cycle after reset, cycle k must show the
// pulse high exactly when k mod TS < TAU_S, and the two delayed outputs must
// repeat it one and two cycles later. Outputs are sampled on the falling edge.
module tb_hrng_sync;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic p0, p0d1, p0d2, p1, p1d1, p1d2;
  hrng_sync                      dut0 (.clk, .rst_n, .clk_pulse(p0), .clk_pulse_d1(p0d1), .clk_pulse_d2(p0d2));
  hrng_sync #(.TS(7), .TAU_S(3)) dut1 (.clk, .rst_n, .clk_pulse(p1), .clk_pulse_d1(p1d1), .clk_pulse_d2(p1d2));

  function automatic logic exp_pulse(int k, int ts, int tau);
    if (k < 0) return 1'b0;
    return (k % ts) < tau;
  endfunction

  task automatic chk(logic got, logic exp, string what, int k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s cycle %0d: got %0b exp %0b", what, k, got, exp);
    end
  endtask

  int highs = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 160; k++) begin
      chk(p0,   exp_pulse(k,   50, 8), "default pulse", k);
      chk(p0d1, exp_pulse(k-1, 50, 8), "default d1", k);
      chk(p0d2, exp_pulse(k-2, 50, 8), "default d2", k);
      chk(p1,   exp_pulse(k,   7, 3),  "small pulse", k);
      chk(p1d1, exp_pulse(k-1, 7, 3),  "small d1", k);
      chk(p1d2, exp_pulse(k-2, 7, 3),  "small d2", k);
      if (p0) highs++;
      @(negedge clk);
    end
    // 160 cycles of a 50-cycle period hold 4 windows: 3 full ones and 8 of 10 in the 4th.
    checks++;
    if (highs != 3*8 + 8) begin failures++; $display("FAIL high count %0d", highs); end
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
