// adc_pkg: constants and helper functions shared by the decimator of the
// sigma-delta ADC.
//
// Decimation plan: the 1-bit modulator stream is decimated by OSR = 16 * R,
// where R (4..128) is the decimation of the 4th-order CIC (SINC) stage and the
// fixed factor 16 comes from four half-band filters (HBF1..HBF4) that each
// halve the rate. The 3-bit OSR selection code k selects R = 2^(k+2), so codes
// 0..5 give OSR 64, 128, 256, 512, 1024, 2048; codes 6 and 7 act as code 5.
//
// Half-band coefficients: each HBF of order N has taps h[-N/2..N/2] with
// h[0] = 1/2, h[m] = 0 for even m != 0, and h[m] = h[-m] for odd m. The odd
// taps are the minimax (equiripple) solution for a stop band from
// (1 - Fo) * Fs/2 to Fs/2, Fo being the normalised pass-band edge listed
// below; the half-band symmetry then makes the pass
// band [0, Fo * Fs/2] equiripple as well. They are stored as integers
// c = round(h * 2^24), i.e. 24 fractional bits, and then moved by up to a few
// hundred LSB (a small search) so that sum_k c_k = 2^22 exactly, which gives every filter
// a DC gain of exactly 1, while keeping the stop-band attenuation at its best:
// 125 dB (HBF1), 149 dB (HBF2), 145 dB (HBF3) and 143 dB (HBF4). Together
// with the SINC stage the bands that alias onto the 0..1 kHz pass band are
// attenuated by at least 139.7 dB at OSR 1024.
//
//   filter  order  Fo     input rate at OSR 1024 / 6.144 MHz clock
//   HBF1     6    1/48    96 kHz
//   HBF2    10    1/24    48 kHz
//   HBF3    14    1/12    24 kHz
//   HBF4    22    1/6     12 kHz
//
// The filter orders, pass-band edges, bus widths and CIC word length are the
// document's; the coefficient values, their 24-bit precision and the OSR code
// mapping are this design's own choices.
`timescale 1ns / 1ps
package adc_pkg;

  // CIC (SINC) stage
  localparam int CIC_ORDER     = 4;   // fourth-order SINC
  localparam int CIC_W         = 30;  // accumulator / differentiator width
  localparam int CIC_MIN_LOG2R = 2;   // R = 4   -> OSR 64
  localparam int CIC_MAX_LOG2R = 7;   // R = 128 -> OSR 2048

  // Bus widths between the stages
  localparam int SINC_OUT_W = 24;
  localparam int HBF1_OUT_W = 26;
  localparam int HBF2_OUT_W = 25;
  localparam int HBF3_OUT_W = 26;
  localparam int HBF4_OUT_W = 25;
  localparam int SAMPLE_W   = 24;     // width of a word on the serial output

  // Half-band coefficients
  localparam int COEF_W    = 24;
  localparam int COEF_FRAC = 24;

  typedef logic signed [COEF_W-1:0] coef_t;

  // log2 of the CIC decimation factor for a given OSR selection code
  function automatic int unsigned osr_log2r(input logic [2:0] code);
    return (code > 3'd5) ? CIC_MAX_LOG2R : CIC_MIN_LOG2R + int'(code);
  endfunction

  // Order of half-band filter STAGE (1..4)
  function automatic int hbf_order(input int stage);
    case (stage)
      1:       return 6;
      2:       return 10;
      3:       return 14;
      default: return 22;
    endcase
  endfunction

  // Number of distinct non-zero off-centre taps: offsets 1, 3, ..., N/2
  function automatic int hbf_ntaps(input int stage);
    return (hbf_order(stage) + 2) / 4;
  endfunction

  // Coefficient of tap offset 2k+1 of filter STAGE, scaled by 2^COEF_FRAC
  function automatic coef_t hbf_coef(input int stage, input int k);
    case (stage)
      1: case (k)
           0: return coef_t'(4719990);
           1: return coef_t'(-525686);
           default: return '0;
         endcase
      2: case (k)
           0: return coef_t'(4919327);
           1: return coef_t'(-825414);
           2: return coef_t'(100391);
           default: return '0;
         endcase
      3: case (k)
           0: return coef_t'(5030148);
           1: return coef_t'(-1026378);
           2: return coef_t'(213714);
           3: return coef_t'(-23180);
           default: return '0;
         endcase
      default: case (k)
           0: return coef_t'(5153546);
           1: return coef_t'(-1287645);
           2: return coef_t'(425675);
           3: return coef_t'(-117437);
           4: return coef_t'(22308);
           5: return coef_t'(-2143);
           default: return '0;
         endcase
    endcase
  endfunction

endpackage
