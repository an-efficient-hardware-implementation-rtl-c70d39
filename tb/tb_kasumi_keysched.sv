// tb_kasumi_keysched: self-checking testbench of the rotating key scheduler.
//
// For several random keys (and the 3GPP test key): load, then advance once
// every two cycles, as the divider does, over 16 rounds (two passes). In every
// cycle the round keys must equal the reference schedule of the current round
// (round n mod 8), and they must not move in the cycles without an advance.
module tb_kasumi_keysched;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic         rst_n, load, adv;
  logic [127:0] key;
  round_keys_t  rk, exp;

  kasumi_keysched dut (.clk, .rst_n, .load, .key, .adv, .rk);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; adv = 1'b0; key = '0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 10; t++) begin
      @(posedge clk); #1;
      key  = (t == 0) ? 128'h2BD6459F82C5B300952C49104881FF48
                      : {$urandom, $urandom, $urandom, $urandom};
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      for (int c = 0; c < 32; c++) begin
        adv = c[0];                // advance at the end of every second cycle
        exp = ref_rk(key, (c / 2) % 8);
        checks++;
        if (rk !== exp) begin
          failures++;
          $display("FAIL key %h cycle %0d: rk %h expected %h", key, c, rk, exp);
        end
        @(posedge clk); #1;
      end
      adv = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
