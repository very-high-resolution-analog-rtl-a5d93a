// clk_phase_gen: behavioural model (not synthesizable logic) of the
// non-overlapping clock phase generator of the switched-capacitor modulator.
//
// From the master clock MCLK it derives the two non-overlapping phases PHI1
// and PHI2, their delayed copies PHI1D and PHI2D, and the complement of each
// of the four (the switches are pass gates, which need both polarities):
// eight clocks in all. PHI1 is high while MCLK is high and PHI2 while MCLK is
// low, each shortened so that the two never overlap. A delayed phase rises
// with its phase but falls TD later, so that the switches driven by the delayed
// phase open last, which reduces signal-dependent charge injection. The ADC
// holds two instances, one per integrator.
//
// Timing (after an MCLK edge): the phase that was high falls at once, its
// delayed copy TD later, and the other phase and its delayed copy rise TNOV
// after that. MCLK half periods must exceed TD + TNOV.
//
// The eight outputs, the two instances and TD = 3 ns are the document's; the
// non-overlap gap TNOV and the edge ordering at the rising edge are this
// model's choices. The real circuit is a gate and inverter-chain network whose
// delays set these times.
`timescale 1ns / 1ps
module clk_phase_gen #(
  parameter realtime TD   = 3.0ns,
  parameter realtime TNOV = 2.0ns
) (
  input  logic mclk,
  output logic phi1,
  output logic phi1_n,
  output logic phi1d,
  output logic phi1d_n,
  output logic phi2,
  output logic phi2_n,
  output logic phi2d,
  output logic phi2d_n
);

  logic p1, p1d, p2, p2d;

  initial begin
    p1 = 1'b0; p1d = 1'b0; p2 = 1'b0; p2d = 1'b0;
  end

  always @(posedge mclk) begin
    p2 <= 1'b0;
    #(TD)   p2d <= 1'b0;
    #(TNOV) begin
      p1 <= 1'b1;
      p1d <= 1'b1;
    end
  end

  always @(negedge mclk) begin
    p1 <= 1'b0;
    #(TD)   p1d <= 1'b0;
    #(TNOV) begin
      p2 <= 1'b1;
      p2d <= 1'b1;
    end
  end

  assign phi1    = p1;
  assign phi1_n  = ~p1;
  assign phi1d   = p1d;
  assign phi1d_n = ~p1d;
  assign phi2    = p2;
  assign phi2_n  = ~p2;
  assign phi2d   = p2d;
  assign phi2d_n = ~p2d;

endmodule
