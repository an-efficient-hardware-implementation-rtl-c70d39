// kasumi_ref_pkg: untimed reference model of KASUMI for the testbenches.
//
// A direct, sequential transcription of the cipher (FI, FO, FL, key schedule,
// eight rounds) with no notion of clocks, memories or iterations. It reads the
// S-box tables from kasumi_pkg; those tables are in turn checked by the
// published 3GPP test vector that tb_kasumi_top runs.
package kasumi_ref_pkg;
  import kasumi_pkg::*;

  function automatic logic [15:0] rol(input logic [15:0] x, input int n);
    return (x << n) | (x >> (16 - n));
  endfunction

  function automatic logic [15:0] ref_fi(input logic [15:0] x, input logic [15:0] ki);
    logic [8:0] nine;
    logic [6:0] seven;
    nine  = x[15:7];
    seven = x[6:0];
    nine  = S9_TABLE[nine] ^ {2'b0, seven};
    seven = S7_TABLE[seven] ^ nine[6:0];
    seven = seven ^ ki[15:9];
    nine  = nine ^ ki[8:0];
    nine  = S9_TABLE[nine] ^ {2'b0, seven};
    seven = S7_TABLE[seven] ^ nine[6:0];
    return {seven, nine};
  endfunction

  function automatic logic [31:0] ref_fl(input logic [31:0] x, input logic [15:0] kl1,
                                         input logic [15:0] kl2);
    logic [15:0] l, r;
    l = x[31:16];
    r = x[15:0];
    r = r ^ rol(l & kl1, 1);
    l = l ^ rol(r | kl2, 1);
    return {l, r};
  endfunction

  function automatic logic [31:0] ref_fo(input logic [31:0] x, input round_keys_t k);
    logic [15:0] l, r, t;
    logic [15:0] ko [3];
    logic [15:0] ki [3];
    ko = '{k.ko1, k.ko2, k.ko3};
    ki = '{k.ki1, k.ki2, k.ki3};
    l = x[31:16];
    r = x[15:0];
    for (int j = 0; j < 3; j++) begin
      t = ref_fi(l ^ ko[j], ki[j]) ^ r;
      l = r;
      r = t;
    end
    return {l, r};
  endfunction

  // Round keys of round n (0-based) for key K.
  function automatic round_keys_t ref_rk(input logic [127:0] key, input int n);
    logic [15:0] k [8];
    logic [15:0] kp [8];
    logic [15:0] c [8];
    round_keys_t rk;
    c = '{16'h0123, 16'h4567, 16'h89AB, 16'hCDEF, 16'hFEDC, 16'hBA98, 16'h7654, 16'h3210};
    for (int j = 0; j < 8; j++) begin
      k[j]  = key[127 - 16*j -: 16];
      kp[j] = k[j] ^ c[j];
    end
    rk.kl1 = rol(k[n % 8], 1);
    rk.kl2 = kp[(n + 2) % 8];
    rk.ko1 = rol(k[(n + 1) % 8], 5);
    rk.ko2 = rol(k[(n + 5) % 8], 8);
    rk.ko3 = rol(k[(n + 6) % 8], 13);
    rk.ki1 = kp[(n + 4) % 8];
    rk.ki2 = kp[(n + 3) % 8];
    rk.ki3 = kp[(n + 7) % 8];
    return rk;
  endfunction

  function automatic logic [63:0] ref_kasumi(input logic [127:0] key, input logic [63:0] pt);
    logic [31:0] l, r, f;
    round_keys_t rk;
    l = pt[63:32];
    r = pt[31:0];
    for (int n = 0; n < 8; n++) begin
      rk = ref_rk(key, n);
      if (n % 2 == 0) f = ref_fo(ref_fl(l, rk.kl1, rk.kl2), rk);
      else            f = ref_fl(ref_fo(l, rk), rk.kl1, rk.kl2);
      {l, r} = {r ^ f, l};
    end
    return {l, r};
  endfunction

endpackage
