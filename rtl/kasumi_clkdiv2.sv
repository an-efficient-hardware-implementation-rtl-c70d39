// kasumi_clkdiv2: divide-by-two frequency divider for the key scheduler.
//
// A toggle flip-flop produces div2, a clock at half the core frequency. The
// core runs one KASUMI round every two cycles, and the key scheduler must move
// to the next round keys once per round; it does so on `tick`, which is high in
// the second cycle of each divided period (div2 high), so the scheduler
// effectively runs on the divided clock while staying on the one global clock.
// `clr` restarts the phase when a block starts, so that ticks fall at the end of
// every round. Using the divided signal as a clock enable, and the
// synchronous clear, are choices of this implementation.
//
// Timing: after a rising edge with clr=1, div2=0; each rising edge with en=1
// toggles div2. tick = en & div2.
module kasumi_clkdiv2 (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  output logic div2,
  output logic tick
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    div2 <= 1'b0;
    else if (clr)  div2 <= 1'b0;
    else if (en)   div2 <= ~div2;
  end

  assign tick = en & div2;

endmodule
