// tb_kasumi_fl: self-checking testbench of the FL function.
//
// Applies 1000 random (x, KL1, KL2) triples plus the all-zero and all-one
// corner cases and compares with the reference FL of kasumi_ref_pkg. One hand
// case is checked against a value worked out by hand:
// x = 0001_0000, KL1 = 0001, KL2 = 0000 -> right = 0000 ^ ROL1(0001) = 0002,
// left = 0001 ^ ROL1(0002) = 0005, so y = 0005_0002.
module tb_kasumi_fl;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] x, y;
  logic [15:0] kl1, kl2;

  kasumi_fl dut (.x, .kl1, .kl2, .y);

  task automatic apply(input logic [31:0] xi, input logic [15:0] k1, input logic [15:0] k2,
                       input logic [31:0] exp);
    x = xi; kl1 = k1; kl2 = k2;
    @(posedge clk);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL FL(%h,%h,%h) = %h expected %h", xi, k1, k2, y, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rx;
    logic [15:0] r1, r2;
    apply(32'h0001_0000, 16'h0001, 16'h0000, 32'h0005_0002);
    apply('0, '0, '0, ref_fl('0, '0, '0));
    apply('1, '1, '1, ref_fl('1, '1, '1));
    for (int i = 0; i < 1000; i++) begin
      rx = $urandom; r1 = 16'($urandom); r2 = 16'($urandom);
      apply(rx, r1, r2, ref_fl(rx, r1, r2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
