// tb_kasumi_top: end-to-end testbench of the KASUMI core at its default
// configuration.
//
// Encrypts the 3GPP KASUMI test vector (key 2BD6459F82C5B300952C49104881FF48,
// plaintext EA024714AD5C4D84, ciphertext DF1F9B251C0BF45F) and then random
// key/plaintext pairs, compared with the untimed reference model. Blocks are
// offered back to back, with idle gaps and with start pulses while the core is
// busy (which must be ignored). Every result must arrive 17 rising edges after
// its start edge, and back-to-back results 16 cycles apart. Each mechanism of
// the design must occur at least once: FL in front of FO (odd rounds), FL
// behind FO (even rounds), the FO second iteration, key-scheduler advances on
// the divide-by-two tick, a back-to-back start, an ignored start, an idle gap.
module tb_kasumi_top;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic         rst_n, start, ready, ct_valid;
  logic [127:0] key;
  logic [63:0]  pt, ct;

  kasumi_top dut (.clk, .rst_n, .start, .ready, .key, .pt, .ct, .ct_valid);

  localparam int NBLOCKS = 200;

  logic [63:0] exp_q [$];
  int          t_q   [$];
  int          cyc = 0, last_valid = -100;
  int          n_front = 0, n_back = 0, n_iter2 = 0, n_tick = 0;
  int          n_b2b = 0, n_ignored = 0, n_idle = 0, n_done = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (20 * NBLOCKS + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled in the middle of each cycle
  always @(negedge clk) if (rst_n) begin
    if (dut.busy && !dut.cnt[0] && !dut.cnt[1]) n_front++;
    if (dut.u_round.back_fl_q && dut.fin)       n_back++;
    if (dut.busy && dut.cnt[0])                 n_iter2++;
    if (dut.tick)                               n_tick++;
    if (!dut.busy)                              n_idle++;
  end

  initial begin
    int sent = 0;
    rst_n = 1'b0; start = 1'b0; key = '0; pt = '0;
    #22 rst_n = 1'b1;
    while (n_done < NBLOCKS) begin
      @(posedge clk);
      cyc++;
      // the edge just passed sampled start: record accepted blocks
      if (start && ready_q) begin
        exp_q.push_back(ref_kasumi(key, pt));
        t_q.push_back(cyc);
      end
      if (start && !ready_q) n_ignored++;
      #1;
      if (ct_valid) begin
        chk(exp_q.size() > 0, "ct_valid without a block");
        if (exp_q.size() > 0) begin
          logic [63:0] e;
          int t0;
          e  = exp_q.pop_front();
          t0 = t_q.pop_front();
          chk(ct === e, $sformatf("ct %h expected %h", ct, e));
          chk(cyc - t0 == 17, $sformatf("latency %0d cycles, expected 17", cyc - t0));
          if (cyc - last_valid < 17) chk(cyc - last_valid == 16, "back-to-back results 16 cycles apart");
          last_valid = cyc;
          n_done++;
        end
      end
      // offer the next block
      ready_q       = ready;
      if (sent < NBLOCKS) begin
        start = (sent % 10 == 9) ? ($urandom % 6 == 0) : 1'b1;
        if (start && ready) begin
          key = (sent == 0) ? 128'h2BD6459F82C5B300952C49104881FF48
                            : {$urandom, $urandom, $urandom, $urandom};
          pt  = (sent == 0) ? 64'hEA024714AD5C4D84 : {$urandom, $urandom};
          sent++;
          if (dut.busy) n_b2b++;         // accepted in the last cycle of a block
        end
      end else start = 1'b0;
    end
    chk(n_front > 0, "FL before FO never used");
    chk(n_back  > 0, "FL after FO never used");
    chk(n_iter2 > 0, "FO second iteration never ran");
    chk(n_tick  > 0, "key scheduler never advanced");
    chk(n_b2b   > 0, "no back-to-back start");
    chk(n_ignored > 0, "no start ignored while busy");
    chk(n_idle  > 0, "core never idle");
    $display("mechanisms: front_fl=%0d back_fl=%0d fo_iter2=%0d key_adv=%0d b2b=%0d ignored=%0d idle_cycles=%0d",
             n_front, n_back, n_iter2, n_tick, n_b2b, n_ignored, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ready_q = 1'b0;
endmodule
