// clock_gen: Clk1/Clk2 timing of the ANN computing hardware.
//
// The control unit steps once per Clk1 period while the framing shift
// registers shift on every Clk2 period; Clk1 is high for one Clk2 period and
// low for three, so up to four shifts fit in one Clk1 period. Following that
// 1:4 ratio, this generator runs the whole design from one clock, clk (the
// Clk2 rate), and derives Clk1 from a 2-bit phase counter. Rather than a
// second clock net, it gives a one-cycle enable, clk1_tick, which every Clk1
// register uses as a clock enable; clk1 is the same waveform as a level, for
// observation. Using an enable in place of a divided clock is this
// implementation's choice.
//
// Timing: after reset clk1_tick is high in cycle 0, 4, 8, ...
module clock_gen #(
  parameter int unsigned RATIO = 4   // Clk2 periods per Clk1 period
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk1,
  output logic clk1_tick
);

  logic [$clog2(RATIO)-1:0] phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 phase_q <= '0;
    else if (phase_q == $bits(phase_q)'(RATIO - 1)) phase_q <= '0;
    else                        phase_q <= phase_q + 1'b1;
  end

  assign clk1_tick = (phase_q == '0);
  assign clk1      = clk1_tick;

endmodule
