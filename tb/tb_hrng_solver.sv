// tb_hrng_solver: exhaustive testbench of the random-threshold solver.
//
// Every pair of 8-bit signed sample and threshold, with the sync gate high
// and low. Expected bit: sync AND (sample + threshold > 0), computed with
// integers. Also counts the cases that show the uncertainty effect: a
// positive sample read as 0 and a negative sample read as 1.
module tb_hrng_solver;
  int checks = 0, failures = 0;
  logic signed [7:0] s, t;
  logic sync, b;
  hrng_solver dut (.sample(s), .thr_noise(t), .sync, .trn_bit(b));

  int pos_as0 = 0, neg_as1 = 0;
  initial begin
    for (int si = -128; si < 128; si++)
      for (int ti = -128; ti < 128; ti++)
        for (int g = 0; g < 2; g++) begin
          logic e;
          s = 8'(si); t = 8'(ti); sync = g[0];
          #1;
          e = g[0] && (si + ti > 0);
          checks++;
          if (b !== e) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d t=%0d sync=%0d got %0b", si, ti, g, b);
          end
          if (g == 1 && si > 0 && !b) pos_as0++;
          if (g == 1 && si < 0 && b)  neg_as1++;
        end
    checks++;
    if (pos_as0 == 0 || neg_as1 == 0) begin failures++; $display("FAIL threshold never moved a decision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
