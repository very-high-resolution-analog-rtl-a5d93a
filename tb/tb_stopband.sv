// tb_stopband: the magnitude response of the whole converter (modulator and
// decimator) at the nominal 6.144 MHz clock and OSR 1024, all parameters at
// their defaults. A sine of 0.485 of full scale is applied at a sequence of
// frequencies: 1 kHz, the pass-band edge, and tones that fold onto the
// 0..1 kHz band at the 6 kHz output rate (5, 7, 11, 47 and 95 kHz, i.e.
// k * 6 kHz +- 1 kHz). For every tone the filters are left to settle for 40
// words after the switch, then 64 words are captured from the serial output
// and a sine at the applied frequency plus an offset is fitted by least
// squares at the capture times; sampled at 6 kHz that is the same as fitting
// the folded tone. Checked: the 1 kHz tone passes with unit gain within
// 0.5 % (the filter droop there is about 0.15 %), and every folding tone
// arrives at least 100 dB below its input amplitude. The decimator is designed
// for about 140 dB there; the check stops at 100 dB because the modulator's
// noise limits what a 64-word fit resolves. The gain found for each tone is
// printed.
`timescale 1ns / 1ps
module tb_stopband;
  localparam realtime TCLK = 1s / 6144000.0;
  localparam real VREF = 3.3, VCM = 1.65, VPK = 1.6, PI = 3.14159265358979;
  localparam int NW = 64, SETTLE = 40, NT = 6;
  localparam real FREQ [NT] = '{1000.0, 5000.0, 7000.0, 11000.0, 47000.0, 95000.0};

  logic mclk = 1'b0, rst_n = 1'b0, stopadc = 1'b0;
  logic [2:0] osr = 3'd4;
  real inap = VCM, inan = VCM;
  real f_in = 1000.0;
  logic sigma, data, valid, clkout, clipped;
  int checks = 0, failures = 0;

  adc_top dut (.inap(inap), .inan(inan), .vref(VREF), .vcm(VCM), .mclk(mclk), .rst_n(rst_n),
               .osr(osr), .stopadc(stopadc), .sigma(sigma), .data(data), .valid(valid),
               .clkout(clkout), .clipped(clipped));

  always #(TCLK / 2) mclk = ~mclk;

  // continuous-phase input, updated every 10 ns
  initial begin
    automatic real ph = 0.0;
    forever begin
      #10ns;
      ph += 2.0 * PI * f_in * 10e-9;
      if (ph > 2.0 * PI) ph -= 2.0 * PI;
      inap = VCM + VPK / 2.0 * $sin(ph);
      inan = VCM - VPK / 2.0 * $sin(ph);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #300ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial receiver: counts words, records the captured window
  int n_words = 0, bits = 0, cap_start = 1 << 30;
  logic signed [23:0] word;
  real y [NW], t [NW];

  always @(posedge clkout) begin
    if (!rst_n || !valid) begin
      bits = 0;
    end else begin
      word = {word[22:0], data};
      bits++;
      if (bits == 24) begin
        if (n_words >= cap_start && n_words < cap_start + NW) begin
          y[n_words - cap_start] = real'(word) / 8388608.0;
          t[n_words - cap_start] = $realtime / 1s;
        end
        n_words++;
        bits = 0;
      end
    end
  end

  // amplitude of a sine at f fitted (with an offset) to the captured words
  function automatic real fit_amp(real f);
    real sc = 0, ss = 0, cc = 0, sy = 0, cy = 0, off = 0, a, b, det, s, c;
    for (int i = 0; i < NW; i++) off += y[i];
    off /= NW;
    for (int i = 0; i < NW; i++) begin
      s = $sin(2.0 * PI * f * t[i]);
      c = $cos(2.0 * PI * f * t[i]);
      ss += s * s; cc += c * c; sc += s * c;
      sy += s * (y[i] - off); cy += c * (y[i] - off);
    end
    det = ss * cc - sc * sc;
    a = (sy * cc - cy * sc) / det;
    b = (cy * ss - sy * sc) / det;
    return $sqrt(a * a + b * b);
  endfunction

  initial begin
    real amp, gain_db;
    repeat (10) @(posedge mclk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < NT; k++) begin
      f_in = FREQ[k];
      cap_start = n_words + SETTLE;
      wait (n_words >= cap_start + NW);
      amp = fit_amp(f_in) / (VPK / VREF);
      gain_db = 20.0 * $log10(amp + 1e-30);
      $display("%8.0f Hz: gain %0.2f dB", f_in, gain_db);
      if (k == 0) check(amp > 0.995 && amp < 1.005, "1 kHz pass-band gain");
      else        check(gain_db < -100.0, $sformatf("%0.0f Hz not suppressed", f_in));
    end
    check(clipped == 1'b0, "no clipping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
