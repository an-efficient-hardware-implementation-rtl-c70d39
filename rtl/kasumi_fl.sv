// kasumi_fl: the KASUMI FL function, a 32-bit linear mixing step keyed by KL.
//
// The input splits into a left and a right 16-bit half:
//   right' = right ^ ROL1(left  & kl1)
//   left'  = left  ^ ROL1(right' | kl2)
//   y      = {left', right'}
// It is made of AND, OR, XOR and one-bit left rotations only, and is purely
// combinational. The round logic holds two copies: one in front of FO (odd
// rounds) and one behind it (even rounds).
module kasumi_fl (
  input  logic [31:0] x,
  input  logic [15:0] kl1,
  input  logic [15:0] kl2,
  output logic [31:0] y
);

  logic [15:0] l, r, a, b;

  always_comb begin
    l = x[31:16];
    a = l & kl1;
    r = x[15:0] ^ {a[14:0], a[15]};
    b = r | kl2;
    l = l ^ {b[14:0], b[15]};
    y = {l, r};
  end

endmodule
