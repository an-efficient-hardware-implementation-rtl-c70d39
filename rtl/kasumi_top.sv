// kasumi_top: compact iterative KASUMI encryption core (64-bit block,
// 128-bit key, 16 cycles per block).
//
// KASUMI is the block cipher inside the 3GPP f8 confidentiality and f9
// integrity functions. This core trades parallel hardware for iterations: one
// FO section with two FI functions is reused twice per round, the two FIs share
// four dual-port S-box memories (two S9, two S7) whose upper level is clocked on
// the falling edge and lower level on the rising edge, and a rotating-array key
// scheduler steps once per round on a divide-by-two tick.
//
//   kasumi_ctrl      16-cycle sequencer and start/ready/ct_valid handshake
//   kasumi_clkdiv2   divide-by-two tick for the key scheduler
//   kasumi_keysched  rotating K and C arrays, round-key wiring
//   kasumi_round     FL / FO / FL round logic and Feistel registers
//
// Interface: present key and pt with start while ready is high (sampled on the
// rising edge). ct_valid pulses for one cycle 17 rising edges later, with ct
// holding the ciphertext until the next result. A new block may be started
// every 16 cycles (ready is high in the last cycle of a block), giving
// 64 bits / 16 cycles of throughput. Only encryption is provided.
module kasumi_top
  import kasumi_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         ready,
  input  logic [127:0] key,
  input  logic [63:0]  pt,
  output logic [63:0]  ct,
  output logic         ct_valid
);

  logic        accept, busy, fin, div2, tick;
  logic [3:0]  cnt;
  round_keys_t rk;

  kasumi_ctrl u_ctrl (
    .clk, .rst_n, .start, .ready, .accept, .busy, .cnt, .fin, .ct_valid
  );

  kasumi_clkdiv2 u_div (
    .clk, .rst_n, .clr(accept), .en(busy), .div2, .tick
  );

  kasumi_keysched u_ks (
    .clk, .rst_n, .load(accept), .key, .adv(tick), .rk
  );

  kasumi_round u_round (
    .clk, .load(accept), .pt, .busy, .cnt, .fin, .rk, .ct
  );

endmodule
