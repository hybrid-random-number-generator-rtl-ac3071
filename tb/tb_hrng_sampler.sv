// tb_hrng_sampler: self-checking testbench of the zero-order-hold sampler.
//
// Random noise every cycle, random strobes. After each clock edge the output
// must equal the noise presented at the last edge with the strobe high, and
// stay unchanged otherwise; zero after reset.
module tb_hrng_sampler;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic              strobe = 1'b0;
  logic signed [7:0] noise = '0, q;
  logic signed [7:0] held = '0;
  hrng_sampler dut (.clk, .rst_n, .strobe, .noise_in(noise), .disc_out(q));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (q !== 8'sd0) begin failures++; $display("FAIL not zero after reset"); end
    for (int i = 0; i < 500; i++) begin
      strobe = ($urandom_range(2) == 0);
      noise  = $signed(8'($urandom));
      @(posedge clk);
      if (strobe) held = noise;
      @(negedge clk);
      checks++;
      if (q !== held) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: got %0d exp %0d", i, q, held);
      end
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
