// tb_hrng_prng: self-checking testbench of the three-LFSR PRNG.
//
// Drives sync with the synchronizer pattern (high 8 of every 50 cycles) and,
// for a second part, with random high and low lengths; presents a new random
// TRN word each period and the password 16'h8191 (IN1, IN5, IN8, IN9, IN16
// set) or a random one. Every cycle rn and both enables are compared with
// tb_hrng_ref_pkg. Counts steps of each controlled register, cycles with both
// enabled and reseeds; each must occur.
module tb_hrng_prng;
  import tb_hrng_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [7:0]  trn = '0;
  logic [15:0] password = 16'h8191;
  logic        sync = 1'b0, rn, en_trn, en_pw1;
  hrng_prng dut (.clk, .rst_n, .trn, .password, .sync, .rn, .en_trn, .en_pw1);

  prng_ref_t r = '{trn: 8'h00, pw1: 8'h00, pw2: 8'h00, sync_q: 1'b0};
  int n_trn = 0, n_pw1 = 0, n_both = 0, n_reseed = 0;

  task automatic cycle();
    #1;
    checks += 3;
    if (rn !== ref_rn(r) || en_trn !== ref_en_trn(r) || en_pw1 !== ref_en_pw1(r)) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: rn %0b/%0b en_trn %0b/%0b en_pw1 %0b/%0b", $time,
                                  rn, ref_rn(r), en_trn, ref_en_trn(r), en_pw1, ref_en_pw1(r));
    end
    if (en_trn && !en_pw1) n_trn++;
    if (en_pw1 && !en_trn) n_pw1++;
    if (en_pw1 && en_trn)  n_both++;
    if (r.sync_q && !sync) n_reseed++;
    @(posedge clk);
    r = ref_step(r, sync, trn, password);
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 40; p++) begin
      int hi, lo;
      hi = (p < 20) ? 8 : 1 + $urandom_range(10);
      lo = (p < 20) ? 42 : 5 + $urandom_range(40);
      if (p >= 10) password = 16'($urandom);
      trn = 8'($urandom);
      sync = 1'b1;
      repeat (hi) cycle();
      sync = 1'b0;
      repeat (lo) cycle();
    end
    checks++;
    if (n_trn == 0 || n_pw1 == 0 || n_both == 0 || n_reseed != 40) begin
      failures++;
      $display("FAIL mechanism counts trn=%0d pw1=%0d both=%0d reseed=%0d", n_trn, n_pw1, n_both, n_reseed);
    end
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
