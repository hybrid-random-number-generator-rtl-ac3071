// tb_hrng_top_td2: end-to-end testbench of the generator with a sampling
// period of two cycles (TD = 2) and a period of 30 cycles (DELTA = 30).
//
// Same checks and mechanism counts as tb_hrng_top, whose description applies
// with these numbers: the window lasts N*TD = 16 cycles, sample m is taken in
// cycle 2m and scanned in cycle 2m + 1, the reseed falls in cycle 18 of the
// period and the buffer is empty from cycle 20. It shows that the timing
// relations of the design hold for a sampling period longer than one cycle.
module tb_hrng_top_td2;
  import tb_hrng_ref_pkg::*;
  localparam int N = hrng_pkg::N_BITS;
  localparam int TD = 2;
  localparam int TS = 30;
  localparam int TAU = N * TD;
  localparam int PERIODS = 60;
  localparam int CYCLES = PERIODS * TS;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic signed [7:0] noise_in = '0, thr_noise = '0, disc_out;
  logic [15:0] password = 16'h8191;
  logic rn, clk_pulse, trn_bit, reseed, step_trn, step_pw1;
  logic [N-1:0] trn_word;

  hrng_top #(.TD(TD), .DELTA(TS)) dut (.clk, .rst_n, .noise_in, .thr_noise, .password, .rn, .clk_pulse,
                .disc_out, .trn_bit, .trn_word, .reseed, .step_trn, .step_pw1);

  int noise_h[CYCLES];
  int thr_h[CYCLES];
  prng_ref_t r = '{trn: 8'h00, pw1: 8'h00, pw2: 8'h00, sync_q: 1'b0};
  int n_reseed = 0, n_up = 0, n_down = 0, n_clear = 0, n_trn = 0, n_pw1 = 0, n_both = 0;
  int n_ones = 0, n_zeros = 0;

  task automatic chk(logic ok, string what, int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s in cycle %0d (period %0d, phase %0d)", what, k, k / TS, k % TS);
    end
  endtask

  function automatic logic [N-1:0] word_of(int ps);
    logic [N-1:0] w;
    for (int m = 0; m < N; m++) w[m] = (noise_h[ps + m*TD] + thr_h[ps + 1 + m*TD]) > 0;
    return w;
  endfunction

  // Amplitudes of the two sources for cycle k.
  task automatic drive(int k);
    int c = k % TS, p = k / TS, nz, th;
    logic [N-1:0] want;
    want = (p == 0) ? 8'b01001101 : 8'b00110010;  // "10110010", "01001100", first bit in bit 0
    nz = $signed(8'($urandom)) / 2;               // noise, -64..63
    th = int'($urandom_range(60)) - 30;           // threshold, -30..30
    if (p < 2 && c < TAU && c % TD == 0) nz = want[c / TD] ? 40 + $urandom_range(20) : -40 - $urandom_range(20);
    noise_h[k] = nz;
    thr_h[k]   = th;
    noise_in   = 8'(nz);
    thr_noise  = 8'(th);
  endtask

  int held = 0;
  initial begin
    logic [N-1:0] seed_now = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < CYCLES; k++) begin
      int c, ps, s;
      logic exp_pulse, exp_bit, sync_d2;
      c  = k % TS;
      ps = k - c;
      drive(k);
      #1;
      exp_pulse = c < TAU;
      chk(clk_pulse == exp_pulse, "clk_pulse", k);
      chk(disc_out == 8'(held), "disc_out", k);
      exp_bit = 1'b0;
      if (c >= 1 && c <= TAU) begin
        s = noise_h[ps + ((c - 1) / TD) * TD];
        exp_bit = (s + thr_h[k]) > 0;
        if (s > 0 && !exp_bit) n_down++;
        if (s <= 0 && exp_bit) n_up++;
        if (exp_bit) n_ones++; else n_zeros++;
      end
      chk(trn_bit == exp_bit, "trn_bit", k);
      chk(reseed == (c == TAU + 2), "reseed timing", k);
      if (c == TAU + 2) begin
        seed_now = word_of(ps);
        chk(trn_word == seed_now, "trn_word at reseed", k);
        if (ps == 0)  chk(trn_word == 8'b01001101, "first reference word 10110010", k);
        if (ps == TS) chk(trn_word == 8'b00110010, "second reference word 01001100", k);
        n_reseed++;
      end
      if (c > (N + 1) * TD + 1) chk(trn_word == '0, "buffer cleared", k);
      if (c == (N + 1) * TD + 2 && trn_word == '0 && seed_now != '0) n_clear++;
      chk(rn == ref_rn(r), "rn against reference", k);
      chk(step_trn == ref_en_trn(r) && step_pw1 == ref_en_pw1(r), "controller enables", k);
      if (step_trn && !step_pw1) n_trn++;
      if (step_pw1 && !step_trn) n_pw1++;
      if (step_pw1 && step_trn)  n_both++;
      sync_d2 = (k >= 2) && ((k - 2) % TS < TAU);
      @(posedge clk);
      if (exp_pulse && (c % TD == 0)) held = noise_h[k];
      r = ref_step(r, sync_d2, seed_now, password);
      @(negedge clk);
      if (k == 20 * TS) password = 16'($urandom);
    end
    checks++;
    if (n_reseed != PERIODS || n_up == 0 || n_down == 0 || n_clear == 0 || n_trn == 0 ||
        n_pw1 == 0 || n_both == 0 || n_ones == 0 || n_zeros == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: reseeds=%0d threshold_up=%0d threshold_down=%0d clears=%0d trn_steps=%0d pw_steps=%0d both=%0d ones=%0d zeros=%0d",
             n_reseed, n_up, n_down, n_clear, n_trn, n_pw1, n_both, n_ones, n_zeros);
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
