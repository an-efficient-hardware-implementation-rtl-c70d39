// tb_kasumi_fo: self-checking testbench of the two-iteration FO module.
//
// Runs FO operations back to back: iteration 0 in one cycle (fo_in and keys
// set just after the rising edge), iteration 1 in the next, and checks fo_out
// right after the rising edge that ends iteration 1, i.e. two cycles after
// fo_in was applied, against the reference FO. A new operation starts in that
// same cycle, so the result must be correct while the next one enters.
module tb_kasumi_fo;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        iter;
  logic [31:0] fo_in, fo_out, exp_q;
  round_keys_t k, k_q;
  logic        pending = 1'b0;

  kasumi_fo dut (.clk, .iter, .fo_in, .ko1(k.ko1), .ko2(k.ko2), .ko3(k.ko3),
                 .ki1(k.ki1), .ki2(k.ki2), .ki3(k.ki3), .fo_out);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < 1001; i++) begin
      // cycle with iteration 0: check the previous operation first
      if (pending) begin
        checks++;
        if (fo_out !== exp_q) begin
          failures++;
          $display("FAIL FO(%h) = %h expected %h", fo_in, fo_out, exp_q);
        end
      end
      if (i == 1000) break;
      iter  = 1'b0;
      fo_in = $urandom;
      k     = {$urandom, $urandom, $urandom, $urandom};
      exp_q = ref_fo(fo_in, k);
      pending = 1'b1;
      @(posedge clk); #1;
      iter  = 1'b1;
      fo_in = $urandom;            // must be ignored in iteration 1
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
