// kasumi_keysched: KASUMI key scheduler built as two rotating register arrays.
//
// The 128-bit key is held as eight 16-bit subkeys K1..K8 (K1 = key[127:112])
// and, beside it, the eight constants C1..C8. On every advance both arrays
// rotate left by one subkey, so that in round i slot j holds K(i+j-1) and
// C(i+j-1). The round keys of the current round are then fixed wiring from the
// slots (K' = K ^ C):
//   KL1 = slot0 <<< 1   KL2 = slot2'
//   KO1 = slot1 <<< 5   KO2 = slot5 <<< 8   KO3 = slot6 <<< 13
//   KI1 = slot4'        KI2 = slot3'        KI3 = slot7'
// The rotating arrays follow the design; the slot wiring is the standard's key
// schedule. After eight advances the arrays are back in their loaded state.
//
// Timing: `load` (rising edge) takes a new key and restarts at round 1. `adv`
// is the divide-by-two tick; with it the arrays rotate once every two cycles,
// so each set of round keys is stable for the two cycles that one round takes.
// rk is a combinational function of the registers.
module kasumi_keysched
  import kasumi_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key,
  input  logic         adv,
  output round_keys_t  rk
);

  logic [15:0] k_arr [8];
  logic [15:0] c_arr [8];
  logic [15:0] kp    [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 8; j++) begin
        k_arr[j] <= '0;
        c_arr[j] <= KEY_C[j];
      end
    end else if (load) begin
      for (int j = 0; j < 8; j++) begin
        k_arr[j] <= key[127 - 16*j -: 16];
        c_arr[j] <= KEY_C[j];
      end
    end else if (adv) begin
      for (int j = 0; j < 8; j++) begin
        k_arr[j] <= k_arr[(j + 1) % 8];
        c_arr[j] <= c_arr[(j + 1) % 8];
      end
    end
  end

  always_comb begin
    for (int j = 0; j < 8; j++) kp[j] = k_arr[j] ^ c_arr[j];
    rk.kl1 = rol16(k_arr[0], 1);
    rk.kl2 = kp[2];
    rk.ko1 = rol16(k_arr[1], 5);
    rk.ko2 = rol16(k_arr[5], 8);
    rk.ko3 = rol16(k_arr[6], 13);
    rk.ki1 = kp[4];
    rk.ki2 = kp[3];
    rk.ki3 = kp[7];
  end

endmodule
