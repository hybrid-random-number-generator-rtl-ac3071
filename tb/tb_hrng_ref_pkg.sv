// tb_hrng_ref_pkg: cycle-level reference model of the three-LFSR PRNG, used
// by the PRNG and top-level testbenches.
//
// The model keeps each 8-bit register as a bit vector with element 0 the
// first stage, steps it with the recurrence of x^8 + x^4 + x^3 + x^2 + 1
// (new first stage = stage2 ^ stage3 ^ stage4 ^ stage8), and applies the
// control rules: the controller register (password bits 9..16) always steps,
// the TRN register steps when the controller output is 0, the password
// register (bits 1..8) when it is 1; both are forced on during the cycle after
// a sync-high cycle; at a falling sync edge all three load their seeds. The
// output bit is the XOR of the last stages of the TRN and password registers.
package tb_hrng_ref_pkg;

  typedef struct {
    logic [7:0] trn, pw1, pw2;
    logic       sync_q;
  } prng_ref_t;

  function automatic logic [7:0] lfsr_next(logic [7:0] s);
    logic fb;
    fb = s[1] ^ s[2] ^ s[3] ^ s[7];
    return {s[6:0], fb};
  endfunction

  function automatic logic ref_rn(prng_ref_t r);
    return r.trn[7] ^ r.pw1[7];
  endfunction

  function automatic logic ref_en_trn(prng_ref_t r);
    return r.sync_q | ~r.pw2[7];
  endfunction

  function automatic logic ref_en_pw1(prng_ref_t r);
    return r.sync_q | r.pw2[7];
  endfunction

  // One clock edge. sync is the value presented during the cycle.
  function automatic prng_ref_t ref_step(prng_ref_t r, logic sync, logic [7:0] trn_seed,
                                         logic [15:0] password);
    prng_ref_t n = r;
    logic load = r.sync_q & ~sync;
    if (ref_en_trn(r)) n.trn = load ? trn_seed : lfsr_next(r.trn);
    if (ref_en_pw1(r)) n.pw1 = load ? password[7:0] : lfsr_next(r.pw1);
    n.pw2    = load ? password[15:8] : lfsr_next(r.pw2);
    n.sync_q = sync;
    return n;
  endfunction

endpackage
