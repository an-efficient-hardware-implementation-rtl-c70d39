// tb_kasumi_clkdiv2: self-checking testbench of the divide-by-two divider.
//
// Checks that div2 toggles on every enabled rising edge (period of two
// cycles), holds while en is low, restarts at 0 after clr, and that tick is
// high exactly when en and div2 are both high.
module tb_kasumi_clkdiv2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst_n, clr, en, div2, tick;
  logic model;

  kasumi_clkdiv2 dut (.clk, .rst_n, .clr, .en, .div2, .tick);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clr = 1'b0; en = 1'b0; model = 1'b0;
    #12 rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      checks += 2;
      if (div2 !== model) begin failures++; $display("FAIL cycle %0d div2=%b exp %b", c, div2, model); end
      if (tick !== (en & model)) begin failures++; $display("FAIL cycle %0d tick=%b", c, tick); end
      // choose inputs for the next edge
      clr = ($urandom % 23) == 0;
      en  = (c < 100) ? 1'b1 : (($urandom % 4) != 0);
      // model of the next state
      if (clr) model = 1'b0;
      else if (en) model = ~model;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
