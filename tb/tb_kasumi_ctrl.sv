// tb_kasumi_ctrl: self-checking testbench of the 16-cycle sequencer.
//
// Starts blocks with random gaps, back to back, and with extra start pulses
// while busy. Checks against a cycle model: cnt runs 0..15 after an accepted
// start, ready is high only when idle or in cycle 15, starts while busy are
// ignored, fin comes 16 cycles and ct_valid 17 cycles after the start edge.
module tb_kasumi_ctrl;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       rst_n, start, ready, accept, busy, fin, ct_valid;
  logic [3:0] cnt;
  // model
  logic       m_busy, m_fin, m_val;
  logic [3:0] m_cnt;
  int         n_b2b = 0, n_ignored = 0, n_valid = 0;

  kasumi_ctrl dut (.clk, .rst_n, .start, .ready, .accept, .busy, .cnt, .fin, .ct_valid);

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b at %0t", what, got, exp, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m_ready;
    rst_n = 1'b0; start = 1'b0;
    m_busy = 0; m_fin = 0; m_val = 0; m_cnt = 0;
    #12 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      m_ready = !m_busy || m_cnt == 15;
      chk(busy, m_busy, "busy");
      chk(fin, m_fin, "fin");
      chk(ct_valid, m_val, "ct_valid");
      chk(ready, m_ready, "ready");
      if (m_busy) begin checks++; if (cnt !== m_cnt) begin failures++; $display("FAIL cnt"); end end
      n_valid += int'(ct_valid);
      start = (c % 300 < 100) ? 1'b1 : (($urandom % 5) == 0);
      #1 chk(accept, start && m_ready, "accept");
      if (start && m_busy && m_cnt != 15) n_ignored++;
      if (start && m_busy && m_cnt == 15) n_b2b++;
      // model next state
      m_val = m_fin;
      m_fin = m_busy && m_cnt == 15;
      if (start && m_ready) begin m_busy = 1; m_cnt = 0; end
      else if (m_busy) begin
        if (m_cnt == 15) m_busy = 0;
        m_cnt = m_cnt + 1;
      end
    end
    checks++;
    if (n_b2b == 0 || n_ignored == 0 || n_valid == 0) begin
      failures++;
      $display("FAIL coverage b2b=%0d ignored=%0d valid=%0d", n_b2b, n_ignored, n_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
