// tb_hrng_lfsr: self-checking testbench of the 8-bit Fibonacci LFSR.
//
// Checks, against properties worked out from the polynomial
// x^8 + x^4 + x^3 + x^2 + 1 rather than from the register structure:
//  - after a reseed (falling edge of sync) the state equals the seed, and the
//    first eight output bits are seed[7], seed[6], ..., seed[0];
//  - the output stream obeys o[t+8] = o[t+6] ^ o[t+5] ^ o[t+4] ^ o[t];
//  - a non-zero seed returns to itself after exactly 255 steps;
//  - with en low the state holds, and a falling sync edge with en low loads
//    nothing;
//  - an all-zero seed stays zero.
module tb_hrng_lfsr;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic en = 1'b1, sync = 1'b0, out1;
  logic [7:0] seed = '0, state;
  hrng_lfsr dut (.clk, .rst_n, .en, .sync, .seed, .state, .out1);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Pulse sync high for 'hi' cycles; state shows the seed after the edge
  // that ends the first low cycle.
  task automatic reseed(logic [7:0] s, int hi);
    seed = s;
    sync = 1'b1;
    repeat (hi) @(negedge clk);
    sync = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic o[600];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 12; trial++) begin
      logic [7:0] s;
      int period;
      s = (trial == 0) ? 8'b01001101 : 8'($urandom_range(255, 1));
      reseed(s, 1 + $urandom_range(8));
      chk(state == s, "state equals seed after reseed");
      for (int t = 0; t < 600; t++) begin
        o[t] = out1;
        if (t < 8) chk(out1 == s[7 - t], "first outputs are the seed, last stage first");
        @(negedge clk);
      end
      for (int t = 0; t + 8 < 600; t++)
        chk(o[t+8] == (o[t+6] ^ o[t+5] ^ o[t+4] ^ o[t]), "output recurrence");
      // Period: reseed and count steps until the state comes back.
      reseed(s, 2);
      period = 0;
      do begin @(negedge clk); period++; end while (state != s && period < 300);
      chk(period == 255, "period 255");
    end
    // Enable low: hold, and no load on a falling sync edge.
    begin
      logic [7:0] h;
      reseed(8'hA5, 3);
      repeat (5) @(negedge clk);
      en = 1'b0;
      h = state;
      seed = 8'h3C;
      sync = 1'b1; @(negedge clk); sync = 1'b0;
      repeat (10) begin @(negedge clk); chk(state == h, "hold while disabled"); end
      en = 1'b1;
      @(negedge clk);
      chk(state != h, "steps again when enabled");
    end
    reseed(8'h00, 2);
    repeat (20) begin @(negedge clk); chk(state == 8'h00 && out1 == 1'b0, "zero seed stays zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
