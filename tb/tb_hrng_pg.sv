// tb_hrng_pg: self-checking testbench of the sampling pulse generator.
//
// Drives a random gate (runs of 1 to 12 cycles high and low) into a TD = 1
// and a TD = 3 instance. Expected: a strobe in cycle j of a high run exactly
// when j mod TD == 0, never while the gate is low. Counts strobes too.
module tb_hrng_pg;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic gate = 1'b0, s1, s3;
  hrng_pg           dut1 (.clk, .rst_n, .gate, .strobe(s1));
  hrng_pg #(.TD(3)) dut3 (.clk, .rst_n, .gate, .strobe(s3));

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0b exp %0b", what, $time, got, exp);
    end
  endtask

  int run = 0, n3 = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      int len;
      len = 1 + $urandom_range(11);
      gate = r[0];
      for (int j = 0; j < len; j++) begin
        #1;
        chk(s1, gate, "TD=1");
        chk(s3, gate && (j % 3 == 0), "TD=3");
        if (s3) n3++;
        @(negedge clk);
      end
    end
    checks++;
    if (n3 == 0) begin failures++; $display("FAIL no TD=3 strobe"); end
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
