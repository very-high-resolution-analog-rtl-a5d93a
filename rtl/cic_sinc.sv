// cic_sinc: fourth-order SINC decimator, built as a cascaded integrator-comb
// (CIC) filter, the first stage of the ADC decimator.
//
// The 1-bit modulator output is mapped to +1 (sigma = 1) or -1 (sigma = 0) and
// run through ORDER accumulators at the modulator clock rate. Every R-th clock
// the last accumulator is sampled and passed through ORDER first differences
// (combs), all in CIC_W-bit two's-complement arithmetic. The accumulators wrap
// around freely; the result is still exact because the filter gain R^ORDER
// fits in CIC_W bits. R = 2^(osr_sel + 2) (4 .. 128), so the overall
// oversampling ratio OSR = 16 R ranges over 64 .. 2048.
//
// Scaling is done once, at the end: the comb output (full scale +-R^ORDER) is
// shifted, with rounding, so that a modulator full scale of +-1 becomes
// +-2^(OUT_W-1), and is then saturated to OUT_W bits (only an all-ones input
// stream reaches the positive limit).
//
// Timing: the accumulators are registered, so the response is that of
// ((1 - z^-R) / (1 - z^-1))^ORDER delayed by ORDER clocks. dout_valid pulses
// for one clock every R clocks while en is high; dout holds its value in
// between. en low (STOPADC) freezes the whole filter.
//
// Order, word length, the wrap-around arithmetic and the scaling at the end
// follow the document; the OSR code mapping, the rounding and the output
// scaling are this design's choices. All state is kept in tmr_reg.
`timescale 1ns / 1ps
module cic_sinc
  import adc_pkg::*;
#(
  parameter int ORDER = CIC_ORDER,
  parameter int W     = CIC_W,
  parameter int OUT_W = SINC_OUT_W,
  parameter bit TMR   = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic [2:0]              osr_sel,
  input  logic                    sigma,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid
);

  localparam int CNT_W = CIC_MAX_LOG2R;
  localparam int EXT_W = W + OUT_W + 2;

  typedef struct packed {
    logic [ORDER-1:0][W-1:0] acc;    // integrators
    logic [ORDER-1:0][W-1:0] dly;    // comb delay elements
    logic [CNT_W-1:0]        cnt;    // decimation phase
    logic [OUT_W-1:0]        dout;
    logic                    valid;
  } state_t;

  state_t s, s_n;

  tmr_reg #(.W($bits(state_t)), .TMR(TMR)) u_state (
    .clk(clk), .rst(rst), .en(1'b1), .d(s_n), .q(s)
  );

  int unsigned      log2r;
  logic [CNT_W-1:0] last_cnt;
  logic [W-1:0]     comb [ORDER+1];
  logic signed [EXT_W-1:0] y_ext, scaled;
  int               shift;

  always_comb begin
    log2r    = osr_log2r(osr_sel);
    last_cnt = CNT_W'((1 << log2r) - 1);
    shift    = ORDER * int'(log2r) - (OUT_W - 1);

    s_n       = s;
    s_n.valid = 1'b0;

    // integrators (registered cascade)
    s_n.acc[0] = s.acc[0] + (sigma ? W'(1) : {W{1'b1}});
    for (int i = 1; i < ORDER; i++) s_n.acc[i] = s.acc[i] + s.acc[i-1];

    // decimation and combs
    comb[0] = s.acc[ORDER-1];
    for (int i = 0; i < ORDER; i++) comb[i+1] = comb[i] - s.dly[i];

    y_ext = EXT_W'(signed'(comb[ORDER]));
    if (shift > 0) scaled = (y_ext + (EXT_W'(1) <<< (shift - 1))) >>> shift;
    else           scaled = y_ext <<< (-shift);

    if (!en) begin
      s_n = s;                 // suspended: hold everything
      s_n.valid = 1'b0;
    end else if (s.cnt >= last_cnt) begin
      s_n.cnt   = '0;
      for (int i = 0; i < ORDER; i++) s_n.dly[i] = comb[i];
      s_n.valid = 1'b1;
      if (scaled > EXT_W'((1 <<< (OUT_W - 1)) - 1))
        s_n.dout = {1'b0, {(OUT_W-1){1'b1}}};
      else if (scaled < -EXT_W'(1 <<< (OUT_W - 1)))
        s_n.dout = {1'b1, {(OUT_W-1){1'b0}}};
      else
        s_n.dout = scaled[OUT_W-1:0];
    end else begin
      s_n.cnt = s.cnt + 1'b1;
    end
  end

  assign dout       = s.dout;
  assign dout_valid = s.valid;

endmodule
