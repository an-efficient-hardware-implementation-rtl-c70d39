// tb_kasumi_round: self-checking testbench of the round logic on its own.
//
// The testbench plays sequencer and key scheduler with a cycle model of them:
// a block is loaded on a start edge, busy/cnt then run through 16 cycles with
// the reference round keys of round cnt/2, fin is high in cycle 16 and ct is
// compared in cycle 17. Blocks run back to back (the next one starts on the
// edge that ends cycle 15) and with idle gaps, for the 3GPP test vector and
// random keys and plaintexts.
module tb_kasumi_round;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        load, busy, fin;
  logic [3:0]  cnt;
  logic [63:0] pt, ct;
  round_keys_t rk;

  kasumi_round dut (.clk, .load, .pt, .busy, .cnt, .fin, .rk, .ct);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key_cur, key_next;
    logic [63:0]  exp_cur, exp_next, exp_fin;
    logic         m_busy, m_fin, m_val, ready, want;
    logic [3:0]   m_cnt;
    int           blocks = 0;
    m_busy = 0; m_fin = 0; m_val = 0; m_cnt = 0;
    key_cur = '0; exp_cur = '0; exp_fin = '0;
    load = 0; pt = '0;
    for (int t = 0; t < 1500 && blocks < 60; t++) begin
      @(posedge clk); #1;
      // model of the sequencer after this edge (load was sampled on it)
      m_val = m_fin;
      m_fin = m_busy && m_cnt == 15;
      if (m_fin) exp_fin = exp_cur;
      if (load) begin
        m_busy = 1; m_cnt = 0; key_cur = key_next; exp_cur = exp_next; blocks++;
      end else if (m_busy) begin
        if (m_cnt == 15) m_busy = 0;
        m_cnt = m_cnt + 1;
      end
      // drive this cycle
      busy = m_busy; cnt = m_cnt; fin = m_fin;
      rk   = ref_rk(key_cur, int'(m_cnt) / 2);
      if (m_val) begin
        checks++;
        if (ct !== exp_fin) begin
          failures++; $display("FAIL ct %h expected %h", ct, exp_fin);
        end
      end
      ready = !m_busy || m_cnt == 15;
      want  = (blocks % 4 != 3) || ($urandom % 8 == 0);
      load  = ready && want;
      if (load) begin
        key_next = (blocks == 0) ? 128'h2BD6459F82C5B300952C49104881FF48
                                 : {$urandom, $urandom, $urandom, $urandom};
        pt       = (blocks == 0) ? 64'hEA024714AD5C4D84 : {$urandom, $urandom};
        exp_next = ref_kasumi(key_next, pt);
      end
    end
    repeat (40) begin
      @(posedge clk); #1;
      m_val = m_fin;
      m_fin = m_busy && m_cnt == 15;
      if (m_fin) exp_fin = exp_cur;
      if (m_busy) begin
        if (m_cnt == 15) m_busy = 0;
        m_cnt = m_cnt + 1;
      end
      busy = m_busy; cnt = m_cnt; fin = m_fin; load = 0;
      rk   = ref_rk(key_cur, int'(m_cnt) / 2);
      if (m_val) begin
        checks++;
        if (ct !== exp_fin) begin
          failures++; $display("FAIL ct %h expected %h", ct, exp_fin);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
