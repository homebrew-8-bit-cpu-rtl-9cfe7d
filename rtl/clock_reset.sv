// clock_reset: two-phase CPU clock and reset synchroniser.
//
// The CPU runs on two square waves of the same frequency, Q0 and Q1, with
// Q1 lagging Q0 by 90 degrees.  Every register in the machine loads on the
// rising edge of Q0; the last quarter of each cycle (Q0 = 0, Q1 = 0) is the
// window for memory and device write strobes.  Here both waves come from a
// 2-bit Johnson counter on a master clock running at four times the CPU
// rate, so one CPU cycle is four master clocks.  Instead of using Q0 as a
// clock, the rest of the design runs on the master clock and updates only
// when `ce` is high: ce marks the master edge on which Q0 rises.
//
// The reset button is brought into the master clock domain by a two-stage
// synchroniser; its output, resetnc_n, goes to the control GAL, which
// registers it once more on a CPU cycle boundary.
//
// The quadrature relation of Q0 and Q1 follows the source design; the
// Johnson counter, the 4x master clock and the synchroniser are choices of
// this implementation (the original oscillator circuit is not reproduced).
//
// Timing: quarters of a cycle are (Q0,Q1) = 10, 11, 01, 00; ce = 1 in 00.
module clock_reset (
  input  logic clk,          // master clock, 4x the CPU clock
  input  logic reset_btn_n,  // asynchronous reset request, active low
  output logic q0,
  output logic q1,
  output logic ce,           // next clk edge is the rising edge of Q0
  output logic resetnc_n     // synchronised reset request, active low
);
  logic [1:0] sync;

  always_ff @(posedge clk) begin
    q0 <= ~q1;
    q1 <= q0;
  end

  always_ff @(posedge clk or negedge reset_btn_n) begin
    if (!reset_btn_n) sync <= 2'b00;
    else              sync <= {sync[0], 1'b1};
  end

  assign resetnc_n = sync[1];
  assign ce        = ~q0 & ~q1;
endmodule
