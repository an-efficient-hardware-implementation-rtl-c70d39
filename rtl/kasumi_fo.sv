// kasumi_fo: the KASUMI FO function computed in two iterations over one
// reusable section.
//
// FO is a three-round Feistel network on two 16-bit halves:
//   R1 = FI(L0 ^ KO1, KI1) ^ R0
//   R2 = FI(R0 ^ KO2, KI2) ^ R1
//   R3 = FI(R1 ^ KO3, KI3) ^ R2          result = {R2, R3}
// The first two FI calls are independent of each other, so a section made of
// one dual-port FI module (two parallel FIs) and two XORs computes
//   P = FI(A ^ KOa, KIa) ^ B,   Q = FI(B ^ KOb, KIb) ^ P
// Iteration 0 runs it on (A,B) = (L0,R0) with KO1/KI1, KO2/KI2 and yields
// (P,Q) = (R1,R2). Iteration 1 feeds (P,Q) back as (A,B) with KO3/KI3 and yields
// P = R3; its second FI has no FO counterpart and its Q is discarded, which is
// what makes the two halves of the unrolled FO structurally identical. The
// iteration multiplexers select the section's data and key inputs.
//
// Timing: one iteration per clock cycle. In cycle c (iter=0) fo_in must be
// stable before the falling edge; in cycle c+1 iter=1; fo_out is valid from the
// rising edge that ends cycle c+1 until the next rising edge (it is a
// combinational function of registers clocked on that edge). The B half is
// delayed through a falling-edge and a rising-edge register so that it meets
// the FI result of the same iteration.
module kasumi_fo (
  input  logic        clk,
  input  logic        iter,
  input  logic [31:0] fo_in,
  input  logic [15:0] ko1,
  input  logic [15:0] ko2,
  input  logic [15:0] ko3,
  input  logic [15:0] ki1,
  input  logic [15:0] ki2,
  input  logic [15:0] ki3,
  output logic [31:0] fo_out
);

  logic [15:0] a, b, x_a, x_b, k_a, y_a, y_b, p, q;
  logic [15:0] b_q, b_qq;

  // Section input multiplexers
  always_comb begin
    a   = iter ? p : fo_in[31:16];
    b   = iter ? q : fo_in[15:0];
    x_a = a ^ (iter ? ko3 : ko1);
    k_a = iter ? ki3 : ki1;
    x_b = b ^ ko2;
  end

  kasumi_fi_dual u_fi (
    .clk, .x_a, .x_b, .ki_a(k_a), .ki_b(ki2), .y_a, .y_b
  );

  // Align B with the FI outputs (upper stage on the falling edge, lower on the rising edge)
  always_ff @(negedge clk) b_q  <= b;
  always_ff @(posedge clk) b_qq <= b_q;

  always_comb begin
    p      = y_a ^ b_qq;
    q      = y_b ^ p;
    fo_out = {b_qq, p};
  end

endmodule
