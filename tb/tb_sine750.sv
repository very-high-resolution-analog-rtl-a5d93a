// tb_sine750: the ADC converting a 750 Hz sine of 3.2 V peak-to-peak
// differential (1.6 V peak, about 0.485 of VREF = 3.3 V) with the nominal
// 6.144 MHz clock and OSR 1024, i.e. 6 kHz output words, all parameters at
// their defaults. After the filters have settled, 64 words (exactly 8 signal
// periods) are captured from the serial output and a sine of 750 Hz plus an
// offset is fitted to them by least squares. Checked: the fitted amplitude
// equals the input amplitude within 0.2 % (the SINC droop at 750 Hz is
// 0.04 %), the offset is below 1e-4 of full scale, and the residual (noise
// and distortion of modulator and decimator together) is at least 98 dB
// below the signal. The modulator's default 0.7 pF sampling-capacitor noise
// sets a floor of about 104 dB at this amplitude. The signal-to-residual
// ratio is printed.
`timescale 1ns / 1ps
module tb_sine750;
  localparam realtime TCLK = 1s / 6144000.0;
  localparam real VREF = 3.3, VCM = 1.65, VPK = 1.6, F = 750.0;
  localparam int NW = 64;

  logic mclk = 1'b0, rst_n = 1'b0, stopadc = 1'b0;
  logic [2:0] osr = 3'd4;
  real inap = VCM, inan = VCM;
  logic sigma, data, valid, clkout, clipped;
  int checks = 0, failures = 0;

  adc_top dut (.inap(inap), .inan(inan), .vref(VREF), .vcm(VCM), .mclk(mclk), .rst_n(rst_n),
               .osr(osr), .stopadc(stopadc), .sigma(sigma), .data(data), .valid(valid),
               .clkout(clkout), .clipped(clipped));

  always #(TCLK / 2) mclk = ~mclk;

  // continuous input, updated well below the modulator clock period
  initial begin
    forever begin
      #10ns;
      inap = VCM + VPK / 2.0 * $sin(2.0 * 3.14159265358979 * F * ($realtime / 1s));
      inan = VCM - VPK / 2.0 * $sin(2.0 * 3.14159265358979 * F * ($realtime / 1s));
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_words = 0, bits = 0;
  logic signed [23:0] word;
  real y [NW], t [NW];

  always @(posedge clkout) begin
    if (!rst_n || !valid) begin
      bits = 0;
    end else begin
      word = {word[22:0], data};
      bits++;
      if (bits == 24) begin
        if (n_words >= 40 && n_words < 40 + NW) begin
          y[n_words - 40] = real'(word) / 8388608.0;
          t[n_words - 40] = $realtime / 1s;   // word times follow the exact clock period
        end
        n_words++;
        bits = 0;
      end
    end
  end

  initial begin
    real sc, ss, cc, sy, cy, a, b, amp, off, res, sig, ph, det, snr;
    repeat (10) @(posedge mclk);
    #1 rst_n = 1'b1;
    wait (n_words >= 40 + NW);
    // least-squares fit of a sin + b cos + off at the word capture times
    ss = 0; cc = 0; sc = 0; sy = 0; cy = 0; off = 0;
    for (int i = 0; i < NW; i++) begin
      ph = 2.0 * 3.14159265358979 * F * t[i];
      ss += $sin(ph) * $sin(ph); cc += $cos(ph) * $cos(ph); sc += $sin(ph) * $cos(ph);
      sy += $sin(ph) * y[i];     cy += $cos(ph) * y[i];     off += y[i];
    end
    off /= NW;
    det = ss * cc - sc * sc;
    a = (sy * cc - cy * sc) / det;
    b = (cy * ss - sy * sc) / det;
    amp = $sqrt(a * a + b * b);
    res = 0; sig = 0;
    for (int i = 0; i < NW; i++) begin
      ph = 2.0 * 3.14159265358979 * F * t[i];
      res += (y[i] - a * $sin(ph) - b * $cos(ph) - off) ** 2;
      sig += (a * $sin(ph) + b * $cos(ph)) ** 2;
    end
    snr = 10.0 * $log10(sig / res);
    $display("amplitude %f of full scale (input %f), offset %e, signal/residual %0.1f dB",
             amp, VPK / VREF, off, snr);
    check(amp / (VPK / VREF) > 0.998 && amp / (VPK / VREF) < 1.002, "amplitude");
    check(off < 1e-4 && off > -1e-4, "offset");
    check(snr > 98.0, "signal to residual ratio");
    check(clipped == 1'b0, "no clipping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
