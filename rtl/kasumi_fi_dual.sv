// kasumi_fi_dual: two KASUMI FI functions evaluated side by side in one clock
// cycle, sharing two dual-port S9 and two dual-port S7 memories.
//
// FI is a four-stage Feistel network on a 16-bit word split into a 9-bit and a
// 7-bit half (S9, S7 with KI, S9, S7). The first S7 lookup only needs the
// input's 7-bit half, so the first S9 and first S7 can be read together; the
// second S9 and second S7 likewise. The two lookup levels are therefore two
// memory stages:
//   upper  (falling edge): S9[x[15:7]] and S7[x[6:0]] for both inputs; the
//          7-bit input half and KI are registered alongside.
//   middle (combinational): nine = S9 ^ x[6:0], seven = S7 ^ nine[6:0] ^ KI[15:9],
//          nine ^= KI[8:0].
//   lower  (rising edge): S9[nine] and S7[seven]; seven is registered alongside.
//   output (combinational): nine' = S9 ^ seven, seven' = S7 ^ nine'[6:0],
//          y = {seven', nine'}.
// Port A of every memory serves FI "a", port B serves FI "b", which is how two
// FI modules collapse into four memories. The falling/rising-edge split and the
// alignment registers follow the design; grouping the four sub-rounds into two
// parallel lookup levels is this implementation's reading of it.
//
// Timing: x_*/ki_* are sampled at a falling edge; y_* is valid after the next
// rising edge and holds until the rising edge after that.
module kasumi_fi_dual (
  input  logic        clk,
  input  logic [15:0] x_a,
  input  logic [15:0] x_b,
  input  logic [15:0] ki_a,
  input  logic [15:0] ki_b,
  output logic [15:0] y_a,
  output logic [15:0] y_b
);

  // ---------------- upper stage (falling edge) ----------------
  logic [8:0]  u9_a, u9_b;
  logic [6:0]  u7_a, u7_b;
  logic [6:0]  z_a,  z_b;     // 7-bit input half, aligned with the S-box outputs
  logic [15:0] kq_a, kq_b;    // KI, aligned with the S-box outputs

  kasumi_s9_rom #(.FALLING(1'b1)) u_s9_up (
    .clk, .addr_a(x_a[15:7]), .addr_b(x_b[15:7]), .dout_a(u9_a), .dout_b(u9_b)
  );
  kasumi_s7_rom #(.FALLING(1'b1)) u_s7_up (
    .clk, .addr_a(x_a[6:0]), .addr_b(x_b[6:0]), .dout_a(u7_a), .dout_b(u7_b)
  );

  always_ff @(negedge clk) begin
    z_a  <= x_a[6:0];
    z_b  <= x_b[6:0];
    kq_a <= ki_a;
    kq_b <= ki_b;
  end

  // ---------------- middle (combinational) ----------------
  logic [8:0] n1_a, n1_b, n2_a, n2_b;
  logic [6:0] s2_a, s2_b;

  always_comb begin
    n1_a = u9_a ^ {2'b00, z_a};
    n1_b = u9_b ^ {2'b00, z_b};
    s2_a = u7_a ^ n1_a[6:0] ^ kq_a[15:9];
    s2_b = u7_b ^ n1_b[6:0] ^ kq_b[15:9];
    n2_a = n1_a ^ kq_a[8:0];
    n2_b = n1_b ^ kq_b[8:0];
  end

  // ---------------- lower stage (rising edge) ----------------
  logic [8:0] d9_a, d9_b;
  logic [6:0] d7_a, d7_b;
  logic [6:0] sq_a, sq_b;     // 7-bit half, aligned with the lower S-box outputs

  kasumi_s9_rom #(.FALLING(1'b0)) u_s9_lo (
    .clk, .addr_a(n2_a), .addr_b(n2_b), .dout_a(d9_a), .dout_b(d9_b)
  );
  kasumi_s7_rom #(.FALLING(1'b0)) u_s7_lo (
    .clk, .addr_a(s2_a), .addr_b(s2_b), .dout_a(d7_a), .dout_b(d7_b)
  );

  always_ff @(posedge clk) begin
    sq_a <= s2_a;
    sq_b <= s2_b;
  end

  // ---------------- output (combinational) ----------------
  logic [8:0] n3_a, n3_b;

  always_comb begin
    n3_a = d9_a ^ {2'b00, sq_a};
    n3_b = d9_b ^ {2'b00, sq_b};
    y_a  = {d7_a ^ n3_a[6:0], n3_a};
    y_b  = {d7_b ^ n3_b[6:0], n3_b};
  end

endmodule
