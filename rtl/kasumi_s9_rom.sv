// kasumi_s9_rom: dual-port synchronous ROM holding the KASUMI S9 S-box
// (512 entries of 9 bits).
//
// Two independent read ports share one table, so one memory serves two FI
// evaluations in the same cycle. Each port registers S9[addr] on a clock
// edge: the rising edge by default, the falling edge when FALLING is set. The
// core clocks its upper S-boxes on the falling edge and its lower S-boxes on
// the rising edge, so that the two lookup levels of an FI function fit in one
// clock cycle. The table is a memory array whose initial contents are the
// S-box, so synthesis infers one two-read-port ROM (block RAM on an FPGA).
// The read-only table and its edge assignment follow the design; the absence
// of a read enable and of an output reset are choices of this implementation.
//
// Timing: dout_x = S9[addr_x as sampled at the last active edge].
module kasumi_s9_rom
  import kasumi_pkg::*;
#(
  parameter bit FALLING = 1'b0
) (
  input  logic         clk,
  input  logic [8:0]  addr_a,
  input  logic [8:0]  addr_b,
  output logic [8:0]  dout_a,
  output logic [8:0]  dout_b
);

  // One table, two read ports: the ROM contents are the memory's initial value.
  logic [8:0] mem [512];
  initial mem = S9_TABLE;

  if (FALLING) begin : g_fall
    always_ff @(negedge clk) begin
      dout_a <= mem[addr_a];
      dout_b <= mem[addr_b];
    end
  end else begin : g_rise
    always_ff @(posedge clk) begin
      dout_a <= mem[addr_a];
      dout_b <= mem[addr_b];
    end
  end

endmodule
