// tb_cic_sinc: self-checking testbench of the fourth-order SINC (CIC) stage.
// A random, biased +-1 stream is filtered by the DUT and by a direct-form
// reference: the convolution with the coefficients of
// (1 + z^-1 + ... + z^-(R-1))^4, delayed by the 4 register stages, computed
// in 64-bit integers (no wrap-around), then scaled to 24 bits and rounded in
// floating point. Every output is compared, for several OSR codes, with
// STOPADC-style pauses (en low) in the stream. Also checked: one output every
// R enabled clocks, none while paused, and that the 30-bit accumulators
// really did wrap around (as they do in normal operation).
`timescale 1ns / 1ps
module tb_cic_sinc;
  localparam int OUT_W = 24;
  localparam int MAXN  = 20000;
  logic clk = 1'b0, rst = 1'b1, en = 1'b1, sigma = 1'b0;
  logic [2:0] osr_sel = 3'd0;
  logic signed [OUT_W-1:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0, n_out = 0, n_pause = 0, n_wrap = 0, n_sat = 0;

  cic_sinc dut (.clk(clk), .rst(rst), .en(en), .osr_sel(osr_sel), .sigma(sigma),
                .dout(dout), .dout_valid(dout_valid));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     xs [MAXN];    // input at enabled edge n
  longint h  [];        // reference impulse response
  int     R, L, n, last_out;

  function automatic void make_h(input int r);
    longint t [];
    h = new [1];
    h[0] = 1;
    for (int s = 0; s < 4; s++) begin
      t = new [h.size() + r - 1];
      foreach (t[i]) t[i] = 0;
      foreach (h[i]) for (int j = 0; j < r; j++) t[i+j] += h[i];
      h = t;
    end
  endfunction

  function automatic longint expected(input int ne);
    longint y = 0;
    real    v;
    longint e;
    foreach (h[j]) if (ne - 4 - j >= 0) y += h[j] * longint'(xs[ne - 4 - j]);
    v = $floor(real'(y) * (2.0 ** (OUT_W - 1)) / (2.0 ** (4 * L)) + 0.5);
    e = longint'(v);
    if (e > (64'sd1 <<< (OUT_W - 1)) - 1) e = (64'sd1 <<< (OUT_W - 1)) - 1;
    return e;
  endfunction

  initial begin
    automatic int codes [5] = '{0, 1, 2, 5, 7};
    int bias, nsamp;
    longint a [4];
    foreach (codes[ci]) begin
      osr_sel = 3'(codes[ci]);
      L = (codes[ci] > 5) ? 7 : codes[ci] + 2;
      R = 1 << L;
      make_h(R);
      bias = (ci == 3) ? 100 : 60 + 10 * ci;   // percentage of ones
      nsamp = (L == 7) ? 30 : 60;
      rst = 1'b1;
      @(negedge clk);
      @(negedge clk);
      rst = 1'b0;
      n = 0;
      last_out = -1;
      foreach (a[i]) a[i] = 0;
      while (n_out < nsamp && n < MAXN - 1) begin
        // set up the input of the next enabled edge
        en = !(($urandom % 50) == 0) || n < 10;
        sigma = ($urandom % 100) < bias;
        @(posedge clk);
        if (en) begin
          xs[n] = sigma ? 1 : -1;
          // reference accumulators, to see wrap-around
          a[0] += longint'(xs[n]);
          for (int i = 1; i < 4; i++) a[i] += a[i-1];
          if (a[3] >= (64'sd1 <<< 29) || a[3] < -(64'sd1 <<< 29)) n_wrap++;
        end else begin
          n_pause++;
        end
        #1;
        if (dout_valid) begin
          check(en, "no output during a pause");
          check((n + 1) % R == 0, $sformatf("output at enabled edge %0d, R=%0d", n, R));
          check(last_out < 0 || n - last_out == R, "one output every R clocks");
          check(longint'(dout) == expected(n),
                $sformatf("R=%0d edge %0d: dout %0d expected %0d", R, n, dout, expected(n)));
          if (dout == 24'sh7fffff) n_sat++;
          last_out = n;
          n_out++;
        end
        if (en) n++;
        @(negedge clk);
      end
      check(n_out >= nsamp, $sformatf("R=%0d produced %0d outputs", R, n_out));
      n_out = 0;
    end
    check(n_pause > 0, "pauses exercised");
    check(n_wrap > 0, "accumulator wrap-around exercised");
    check(n_sat > 0, "full-scale limit exercised");
    $display("pauses %0d, wrapped accumulator cycles %0d, full-scale outputs %0d", n_pause, n_wrap, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
