// tb_kasumi_s9_rom: self-checking testbench of the dual-port S9 ROM.
//
// Instantiates one rising-edge and one falling-edge copy. Every address is
// read through both ports of both copies (port B walks the table backwards).
// Checks: each read equals the S-box entry; entries 0, 1 and 512-1 equal the
// values published in the KASUMI specification; all 512 outputs are distinct
// (S9 is a permutation); the falling-edge copy updates on the falling edge
// and the rising-edge copy not before the rising edge.
module tb_kasumi_s9_rom;
  import kasumi_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [8:0] addr_a, addr_b;
  logic [8:0] r_a, r_b, f_a, f_b;
  bit seen [512];

  kasumi_s9_rom #(.FALLING(1'b0)) dut_r (.clk, .addr_a, .addr_b, .dout_a(r_a), .dout_b(r_b));
  kasumi_s9_rom #(.FALLING(1'b1)) dut_f (.clk, .addr_a, .addr_b, .dout_a(f_a), .dout_b(f_b));

  task automatic check(input logic [8:0] got, input logic [8:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] old_r;
    addr_a = '0; addr_b = '0;
    @(posedge clk);
    for (int i = 0; i < 512; i++) begin
      // change addresses just after a rising edge
      #1;
      addr_a = 9'(i);
      addr_b = 9'(511 - i);
      old_r  = r_a;
      @(negedge clk); #1;
      check(f_a, S9_TABLE[i], "falling copy port A");
      check(f_b, S9_TABLE[511 - i], "falling copy port B");
      check(r_a, old_r, "rising copy must hold until the rising edge");
      @(posedge clk); #1;
      check(r_a, S9_TABLE[i], "rising copy port A");
      check(r_b, S9_TABLE[511 - i], "rising copy port B");
      checks++;
      if (seen[r_a]) begin failures++; $display("FAIL value %0d repeated", r_a); end
      seen[r_a] = 1'b1;
      @(posedge clk);
    end
    // spot values from the specification
    #1 addr_a = 0; addr_b = 1;
    @(posedge clk); #1;
    check(r_a, 9'd167, "S9[0]");
    check(r_b, 9'd239, "S9[1]");
    addr_a = 511;
    @(posedge clk); #1;
    check(r_a, 9'd461, "S9[511]");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
