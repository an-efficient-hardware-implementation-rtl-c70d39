// kasumi_round: round logic of the KASUMI core (FO module, two FL modules,
// Feistel registers and selection multiplexers).
//
// KASUMI round i maps (L, R) to (R ^ f_i(L), L), with f_i = FO(FL(L)) in odd
// rounds and f_i = FL(FO(L)) in even rounds. One round takes two cycles, the
// two iterations of the FO module. Two FL instances sit around the FO module;
// only the one in front (odd rounds) or the one behind (even rounds) is used,
// selected by multiplexers.
//
// Schedule, per cycle c of a block (iteration = c[0], round = c[3:1]):
//  * iteration 0, first half: the previous round's result is formed from the
//    last S-box stage: Lnew = R ^ f, Rnew = L (round 1 takes the plaintext).
//    Lnew, through the front FL in odd rounds, is the FO input. On the falling
//    edge the upper S-boxes sample it and the Feistel registers take
//    (Lnew, Rnew).
//  * iteration 1: FO's second pass; on the falling edge the KL of this round
//    and the round's parity are kept for the back FL, because the key
//    scheduler moves on before that FL is evaluated.
//  * fin (the cycle after cycle 15): Lnew/Rnew is the ciphertext, stored on
//    the falling edge.
// The unit list follows the design; the edge on which the Feistel and result
// registers load is this implementation's choice.
//
// Timing: pt is loaded on the rising edge with load=1 (the block's start edge);
// ct is valid from the falling edge of the fin cycle until the next fin.
module kasumi_round
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  logic [63:0] pt,
  input  logic        busy,
  input  logic [3:0]  cnt,
  input  logic        fin,
  input  round_keys_t rk,
  output logic [63:0] ct
);

  logic [63:0] pt_q;
  logic [31:0] l_q, r_q;          // Feistel state at the start of the current round
  logic [15:0] kl1_q, kl2_q;      // KL of the round whose FO is finishing
  logic        back_fl_q;         // that round is even: FL follows FO

  logic        iter, first, front_fl;
  logic [31:0] l_cur, r_cur, l_new, fl_front, fo_in, fo_out, fl_back, f;

  assign iter     = cnt[0];
  assign first    = (cnt == 4'd0);
  assign front_fl = !cnt[1];      // rounds 1,3,5,7 (cnt[3:1] even)

  always_ff @(posedge clk) if (load) pt_q <= pt;

  kasumi_fl u_fl_front (.x(l_cur),  .kl1(rk.kl1),  .kl2(rk.kl2),  .y(fl_front));
  kasumi_fl u_fl_back  (.x(fo_out), .kl1(kl1_q),   .kl2(kl2_q),   .y(fl_back));

  kasumi_fo u_fo (
    .clk, .iter, .fo_in,
    .ko1(rk.ko1), .ko2(rk.ko2), .ko3(rk.ko3),
    .ki1(rk.ki1), .ki2(rk.ki2), .ki3(rk.ki3),
    .fo_out
  );

  always_comb begin
    f     = back_fl_q ? fl_back : fo_out;
    l_new = r_q ^ f;
    l_cur = first ? pt_q[63:32] : l_new;
    r_cur = first ? pt_q[31:0]  : l_q;
    fo_in = front_fl ? fl_front : l_cur;
  end

  always_ff @(negedge clk) begin
    if (busy && !iter) begin
      l_q <= l_cur;
      r_q <= r_cur;
    end
    if (busy && iter) begin
      kl1_q     <= rk.kl1;
      kl2_q     <= rk.kl2;
      back_fl_q <= cnt[1];
    end
    if (fin) ct <= {l_new, l_q};
  end

endmodule
