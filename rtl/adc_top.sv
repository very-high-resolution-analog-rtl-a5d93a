// adc_top: the complete sigma-delta ADC, analog front end (behavioural
// models) and digital back end.
//
// The differential input INAP - INAN is converted by a second-order, 1-bit
// sigma-delta modulator clocked by MCLK; two clock phase generators, one per
// integrator, produce its switched-capacitor phases. The modulator bit stream
// leaves the chip on SIGMA (for filtering off chip) and feeds the on-chip
// decimator: a fourth-order SINC stage with selectable decimation, four
// half-band filters and a saturation stage. Each 24-bit result is shifted out
// on DATA / VALID / CLKOUT. OSR[2:0] selects the total oversampling ratio
// (0..5: 64 .. 2048; with the nominal 6.144 MHz clock, 96 kHz down to 3 kHz
// output rate, 6 kHz at OSR 1024); STOPADC suspends the decimator. RST_N is
// the external reset, synchronised to MCLK inside.
//
// Output code: a signed fraction of VREF, full scale +-2^23 for
// INAP - INAN = +-VREF (the modulator is only stable for inputs well inside
// that range).
//
// The partitioning and pin names follow the document's block diagram; RST_N and
// CLIPPED are this design's additions (the latter an observation output of the
// saturation stage). The modulator and the clock generators are behavioural
// models: only the digital part is synthesizable. Of the eight phases of each
// generator the model uses the two that time its sampling and integration; the
// others drive individual switches of the real circuit and are left open.
`timescale 1ns / 1ps
module adc_top
  import adc_pkg::*;
(
  input  real        inap,
  input  real        inan,
  input  real        vref,
  input  real        vcm,
  input  logic       mclk,
  input  logic       rst_n,
  input  logic [2:0] osr,
  input  logic       stopadc,
  output logic       sigma,
  output logic       data,
  output logic       valid,
  output logic       clkout,
  output logic       clipped
);

  // clock phase generators (one per integrator)
  logic phi1_1, phi1n_1, phi1d_1, phi1dn_1, phi2_1, phi2n_1, phi2d_1, phi2dn_1;
  logic phi1_2, phi1n_2, phi1d_2, phi1dn_2, phi2_2, phi2n_2, phi2d_2, phi2dn_2;

  clk_phase_gen u_clkgen1 (
    .mclk(mclk),
    .phi1(phi1_1), .phi1_n(phi1n_1), .phi1d(phi1d_1), .phi1d_n(phi1dn_1),
    .phi2(phi2_1), .phi2_n(phi2n_1), .phi2d(phi2d_1), .phi2d_n(phi2dn_1)
  );

  clk_phase_gen u_clkgen2 (
    .mclk(mclk),
    .phi1(phi1_2), .phi1_n(phi1n_2), .phi1d(phi1d_2), .phi1d_n(phi1dn_2),
    .phi2(phi2_2), .phi2_n(phi2n_2), .phi2d(phi2d_2), .phi2d_n(phi2dn_2)
  );

  // modulator
  logic sigma_int;

  sdm_model u_sdm (
    .inap(inap), .inan(inan), .vref(vref), .vcm(vcm), .mclk(mclk),
    .phi1d_1(phi1d_1), .phi2_1(phi2_1),
    .phi1d_2(phi1d_2), .phi2_2(phi2_2),
    .sigma(sigma_int)
  );

  assign sigma = sigma_int;

  // digital part
  logic rst;

  rst_sync u_rst (.clk(mclk), .rst_n(rst_n), .rst(rst));

  logic signed [SAMPLE_W-1:0] sample;
  logic                       sample_valid;

  decimator u_dec (
    .clk(mclk), .rst(rst), .en(!stopadc), .osr_sel(osr), .sigma(sigma_int),
    .dout(sample), .dout_valid(sample_valid), .clipped(clipped)
  );

  serial_tx #(.W(SAMPLE_W)) u_tx (
    .clk(mclk), .rst(rst), .din(sample), .din_valid(sample_valid),
    .data(data), .valid(valid), .clkout(clkout)
  );

endmodule
