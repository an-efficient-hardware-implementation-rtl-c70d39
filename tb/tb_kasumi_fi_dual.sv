// tb_kasumi_fi_dual: self-checking testbench of the dual-port FI module.
//
// Feeds a new pair of independent (x, KI) inputs every cycle, changed just after
// each rising edge, so the upper memories sample them on the following falling
// edge. Both FI results must appear after the next rising edge, one cycle per
// pair, and equal the reference FI. 2000 random pairs plus corner cases.
module tb_kasumi_fi_dual;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] x_a, x_b, ki_a, ki_b, y_a, y_b;

  kasumi_fi_dual dut (.clk, .x_a, .x_b, .ki_a, .ki_b, .y_a, .y_b);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_a, exp_b;
    @(posedge clk); #1;
    for (int i = 0; i < 2004; i++) begin
      case (i)
        0: begin x_a = '0; ki_a = '0; x_b = '1; ki_b = '1; end
        1: begin x_a = '1; ki_a = '0; x_b = '0; ki_b = '1; end
        default: begin
          x_a = 16'($urandom); ki_a = 16'($urandom);
          x_b = 16'($urandom); ki_b = 16'($urandom);
        end
      endcase
      exp_a = ref_fi(x_a, ki_a);
      exp_b = ref_fi(x_b, ki_b);
      @(posedge clk); #1;          // one cycle later the result is there
      checks += 2;
      if (y_a !== exp_a) begin failures++; $display("FAIL FI a(%h,%h)=%h exp %h", x_a, ki_a, y_a, exp_a); end
      if (y_b !== exp_b) begin failures++; $display("FAIL FI b(%h,%h)=%h exp %h", x_b, ki_b, y_b, exp_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
