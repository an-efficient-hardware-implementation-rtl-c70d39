// kasumi_ctrl: sequencer of the iterative KASUMI core.
//
// One block takes 16 clock cycles: eight rounds of two FO iterations each.
// cnt counts those cycles (iteration = cnt[0], round = cnt[3:1]). A block is
// accepted with start while ready is high; ready is high when idle and in the
// last cycle of a block, so blocks can follow each other every 16 cycles. In
// the cycle after the last one, fin is high: the round logic then forms the
// ciphertext from the last S-box stage and stores it on the falling edge;
// ct_valid follows one cycle later. The 16-cycle schedule follows the design;
// the start/ready/ct_valid handshake is this implementation's own.
//
// Timing (rising edge E0 samples start): busy and cnt=0..15 in cycles 0..15,
// fin in cycle 16, ct_valid in cycle 17 (17 cycles after the start edge).
module kasumi_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  output logic       accept,
  output logic       busy,
  output logic [3:0] cnt,
  output logic       fin,
  output logic       ct_valid
);

  assign ready  = !busy || (cnt == 4'd15);
  assign accept = start && ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cnt      <= '0;
      fin      <= 1'b0;
      ct_valid <= 1'b0;
    end else begin
      fin      <= busy && (cnt == 4'd15);
      ct_valid <= fin;
      if (accept) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        cnt  <= cnt + 4'd1;
        if (cnt == 4'd15) busy <= 1'b0;
      end
    end
  end

  // cnt only moves while a block is in progress
  a_cnt_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               !busy && !accept |=> cnt == $past(cnt));
  // ct_valid is set by the 17th rising edge after the one that accepted the
  // block; sampled on edges, that is seen 18 edges after accept was seen
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              accept |-> ##18 ct_valid);

endmodule
