// decimator: digital decimation filter of the sigma-delta ADC.
//
// The 1-bit modulator stream at the clock rate is reduced by OSR = 16 R:
// a fourth-order SINC (CIC) stage decimates by R = 4 .. 128 (osr_sel), then
// four half-band filters each decimate by two, and the 25-bit result is
// saturated to the 24-bit output word. With a 6.144 MHz clock, OSR 1024 gives
// 6 kHz output samples and OSR 64 gives 96 kHz.
//
//   sigma -> SINC (24b) -> HBF1 (26b) -> HBF2 (25b) -> HBF3 (26b) -> HBF4 (25b)
//         -> saturation (24b) -> dout
//
// Full scale: a modulator stream of all ones (or zeros) corresponds to
// +2^23 (or -2^23) before saturation, so the output word is a signed fraction
// of the modulator reference. en low (the STOPADC pin) freezes the SINC stage;
// no new samples then enter the half-band filters, which finish any sample
// already under way and go idle. dout_valid pulses once per output sample;
// clipped pulses with it when the saturation stage clamped the sample.
//
// Stage order, decimation factors, widths and the STOPADC function are the
// document's.
`timescale 1ns / 1ps
module decimator
  import adc_pkg::*;
#(
  parameter bit TMR = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  input  logic [2:0]                 osr_sel,
  input  logic                       sigma,
  output logic signed [SAMPLE_W-1:0] dout,
  output logic                       dout_valid,
  output logic                       clipped
);

  logic signed [SINC_OUT_W-1:0] s0;
  logic signed [HBF1_OUT_W-1:0] s1;
  logic signed [HBF2_OUT_W-1:0] s2;
  logic signed [HBF3_OUT_W-1:0] s3;
  logic signed [HBF4_OUT_W-1:0] s4;
  logic v0, v1, v2, v3, v4;

  cic_sinc #(.TMR(TMR)) u_sinc (
    .clk(clk), .rst(rst), .en(en), .osr_sel(osr_sel), .sigma(sigma),
    .dout(s0), .dout_valid(v0)
  );

  hbf #(.STAGE(1), .IN_W(SINC_OUT_W), .OUT_W(HBF1_OUT_W), .TMR(TMR)) u_hbf1 (
    .clk(clk), .rst(rst), .in_valid(v0), .din(s0), .dout_valid(v1), .dout(s1)
  );
  hbf #(.STAGE(2), .IN_W(HBF1_OUT_W), .OUT_W(HBF2_OUT_W), .TMR(TMR)) u_hbf2 (
    .clk(clk), .rst(rst), .in_valid(v1), .din(s1), .dout_valid(v2), .dout(s2)
  );
  hbf #(.STAGE(3), .IN_W(HBF2_OUT_W), .OUT_W(HBF3_OUT_W), .TMR(TMR)) u_hbf3 (
    .clk(clk), .rst(rst), .in_valid(v2), .din(s2), .dout_valid(v3), .dout(s3)
  );
  hbf #(.STAGE(4), .IN_W(HBF3_OUT_W), .OUT_W(HBF4_OUT_W), .TMR(TMR)) u_hbf4 (
    .clk(clk), .rst(rst), .in_valid(v3), .din(s3), .dout_valid(v4), .dout(s4)
  );

  saturate #(.IN_W(HBF4_OUT_W), .OUT_W(SAMPLE_W)) u_sat (
    .din(s4), .din_valid(v4), .dout(dout), .dout_valid(dout_valid), .clipped(clipped)
  );

endmodule
