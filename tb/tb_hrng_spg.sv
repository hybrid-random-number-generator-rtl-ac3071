// tb_hrng_spg: self-checking testbench of the single pulse generator.
//
// Random input runs of 1 to 15 cycles. The output must be high exactly in the
// first cycle of each high run (one pulse per run, whatever its length) and
// low otherwise. Counts pulses against the number of high runs.
module tb_hrng_spg;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic in1 = 1'b0, out1;
  hrng_spg dut (.clk, .rst_n, .in1, .out1);

  int pulses = 0, runs = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 80; r++) begin
      int len;
      len = 1 + $urandom_range(14);
      in1 = r[0];
      if (in1) runs++;
      for (int j = 0; j < len; j++) begin
        #1;
        checks++;
        if (out1 !== (in1 && j == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL run %0d cycle %0d: out %0b", r, j, out1);
        end
        if (out1) pulses++;
        @(negedge clk);
      end
    end
    checks++;
    if (pulses != runs) begin failures++; $display("FAIL %0d pulses for %0d runs", pulses, runs); end
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
