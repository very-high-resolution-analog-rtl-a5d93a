// hbf: half-band FIR filter with decimation by two (one of HBF1..HBF4).
//
// An equiripple half-band filter of order N has only N/4 + 1 distinct non-zero
// coefficients besides the centre tap 1/2, because every even tap other than
// the centre is zero and the taps are symmetric. The filter therefore keeps
// the last N+1 input samples in a delay line and, once for every second input
// sample, computes
//     y = x[N/2] / 2 + sum_k c_k * (x[N/2 - (2k+1)] + x[N/2 + (2k+1)])
// with a single multiplier that handles one coefficient per clock (pre-adding
// the two symmetric samples first). The result is rounded to the input's LSB
// weight and saturated to OUT_W bits; the extra bits of OUT_W over IN_W are
// headroom for the filter's overshoot.
//
// Timing: the products take K = N/4 + 1 clocks after every second in_valid,
// and dout_valid pulses one clock after the last one, so the latency from the
// second input to the output is K + 1 clocks. A new input must not arrive
// while the products run (at least K + 1 clocks between inputs); at the
// fastest rate of the ADC the inputs of HBF1 are 4 clocks apart and K = 2.
//
// The order and pass-band edge of each filter (STAGE selects them) and the bus
// widths are the document's; the coefficients (see adc_pkg), the serial
// multiply-accumulate architecture, rounding and saturation are this design's
// own.
`timescale 1ns / 1ps
module hbf
  import adc_pkg::*;
#(
  parameter int STAGE = 1,
  parameter int IN_W  = SINC_OUT_W,
  parameter int OUT_W = HBF1_OUT_W,
  parameter bit TMR   = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din,
  output logic                    dout_valid,
  output logic signed [OUT_W-1:0] dout
);

  localparam int N     = hbf_order(STAGE);
  localparam int C     = N / 2;               // centre tap index
  localparam int K     = hbf_ntaps(STAGE);
  localparam int KW    = $clog2(K + 1);
  localparam int ACC_W = IN_W + COEF_W + 4;

  typedef struct packed {
    logic [N:0][IN_W-1:0] x;      // x[0] is the newest sample
    logic                 phase;  // 1: the next input completes a pair
    logic                 busy;   // products running
    logic [KW-1:0]        k;
    logic [ACC_W-1:0]     acc;
    logic                 fin;    // accumulation done, output next clock
    logic [OUT_W-1:0]     dout;
    logic                 valid;
  } state_t;

  state_t s, s_n;

  tmr_reg #(.W($bits(state_t)), .TMR(TMR)) u_state (
    .clk(clk), .rst(rst), .en(1'b1), .d(s_n), .q(s)
  );

  logic signed [IN_W:0]        pair;
  logic signed [ACC_W-1:0]     prod, base, rounded;
  logic signed [ACC_W-COEF_FRAC-1:0] y;
  coef_t                       coef;

  always_comb begin
    s_n       = s;
    s_n.valid = 1'b0;
    s_n.fin   = 1'b0;

    // one coefficient per clock
    pair = '0;
    coef = '0;
    for (int j = 0; j < K; j++) begin
      if (int'(s.k) == j) begin
        pair = (IN_W+1)'(signed'(s.x[C - (2*j + 1)])) + (IN_W+1)'(signed'(s.x[C + (2*j + 1)]));
        coef = hbf_coef(STAGE, j);
      end
    end
    prod = ACC_W'(pair) * ACC_W'(coef);
    base = (s.k == '0) ? (ACC_W'(signed'(s.x[C])) <<< (COEF_FRAC - 1)) : signed'(s.acc);

    if (s.busy) begin
      s_n.acc = base + prod;
      if (int'(s.k) == K - 1) begin
        s_n.busy = 1'b0;
        s_n.fin  = 1'b1;
      end else begin
        s_n.k = s.k + 1'b1;
      end
    end

    // round to the input LSB weight, then saturate
    rounded = signed'(s.acc) + (ACC_W'(1) <<< (COEF_FRAC - 1));
    y       = rounded[ACC_W-1:COEF_FRAC];
    if (s.fin) begin
      s_n.valid = 1'b1;
      if (y > (ACC_W-COEF_FRAC)'((1 <<< (OUT_W - 1)) - 1))
        s_n.dout = {1'b0, {(OUT_W-1){1'b1}}};
      else if (y < -(ACC_W-COEF_FRAC)'(1 <<< (OUT_W - 1)))
        s_n.dout = {1'b1, {(OUT_W-1){1'b0}}};
      else
        s_n.dout = y[OUT_W-1:0];
    end

    if (in_valid) begin
      s_n.x     = {s.x[N-1:0], din};
      s_n.phase = ~s.phase;
      if (s.phase) begin
        s_n.busy = 1'b1;
        s_n.k    = '0;
      end
    end
  end

  assign dout       = s.dout;
  assign dout_valid = s.valid;

  // a new sample must not shift the delay line under a running computation
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) in_valid |-> !s.busy)
    else $error("hbf%0d: input arrived while the products were running", STAGE);

endmodule
