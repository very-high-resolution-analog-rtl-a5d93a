// tb_decimator: self-checking testbench of the complete decimation chain
// (SINC, HBF1..HBF4, saturation), fed by a behavioural second-order
// sigma-delta loop written here in floating point, or by fixed bit patterns.
// Checked at OSR 64 (fastest rate, where HBF1 receives a sample every 4
// clocks) and OSR 128:
//   - exact outputs for exact inputs: all ones gives +2^23 - 1, all zeros
//     -2^23, alternating bits 0, once the filters have settled;
//   - DC inputs: the mean of 16 outputs equals u * 2^23 within 1e-3 of full
//     scale;
//   - one output every OSR clocks;
//   - group delay: after a step, the output crosses half way at
//     2R + 129R clocks (SINC plus half-band delays) plus the pipeline
//     latency, within half an output period;
//   - overshoot of a full-scale step is clamped by the saturation stage;
//   - en low (STOPADC) stops the outputs, and they resume afterwards.
`timescale 1ns / 1ps
module tb_decimator;
  import adc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b1, sigma = 1'b0;
  logic [2:0] osr_sel = 3'd0;
  logic signed [SAMPLE_W-1:0] dout;
  logic dout_valid, clipped;
  int checks = 0, failures = 0;
  int n_clip = 0, n_pause = 0, n_rate_ok = 0, n_switch = 0;

  decimator dut (.clk(clk), .rst(rst), .en(en), .osr_sel(osr_sel), .sigma(sigma),
                 .dout(dout), .dout_valid(dout_valid), .clipped(clipped));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus source: 0 = modulator, 1 = all ones, 2 = all zeros, 3 = alternating
  int  src = 0;
  real u = 0.0, x1 = 0.0, x2 = 0.0;
  int  cyc = 0, last_valid_cyc = -1, out_interval = 0;
  logic signed [SAMPLE_W-1:0] last_out;

  always @(negedge clk) begin
    case (src)
      0: begin
        sigma = (x2 > 0.0);
        x1 = x1 + 0.5 * (u - (sigma ? 1.0 : -1.0));
        x2 = x2 + 0.5 * (x1 - (sigma ? 1.0 : -1.0));
      end
      1: sigma = 1'b1;
      2: sigma = 1'b0;
      default: sigma = ~sigma;
    endcase
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && dout_valid) begin
      out_interval   <= (last_valid_cyc < 0) ? 0 : cyc - last_valid_cyc;
      last_valid_cyc <= cyc;
      last_out       <= dout;
      if (clipped) n_clip++;
    end
  end

  task automatic wait_outputs(input int n);
    repeat (n) begin
      @(posedge clk);
      while (!dout_valid) @(posedge clk);
    end
    @(negedge clk);
  endtask

  task automatic check_rate(input int osr, input int n);
    repeat (n) begin
      wait_outputs(1);
      check(out_interval == osr, $sformatf("output interval %0d, OSR %0d", out_interval, osr));
      if (out_interval == osr) n_rate_ok++;
    end
  endtask

  task automatic mean_of(input int n, output real m);
    m = 0.0;
    repeat (n) begin
      wait_outputs(1);
      m += real'(last_out);
    end
    m /= n;
  endtask

  initial begin
    automatic int codes [2] = '{0, 1};
    automatic real levels [4] = '{0.5, -0.3, 0.0, 0.82};
    real m;
    int R, osr, t_step, t_prev, t_cross;
    real y_prev, t_exact, predicted;
    foreach (codes[ci]) begin
      osr_sel = 3'(codes[ci]);
      R = 4 << codes[ci];
      osr = 16 * R;
      rst = 1'b1;
      repeat (3) @(negedge clk);
      rst = 1'b0;
      last_valid_cyc = -1;

      // exact responses
      src = 1; wait_outputs(40); check_rate(osr, 4);
      check(last_out == 24'sh7fffff, $sformatf("all ones -> %0d", last_out));
      src = 3; wait_outputs(40);
      check(last_out == 0, $sformatf("alternating -> %0d", last_out));
      src = 2; wait_outputs(40);
      check(last_out == -24'sh800000, $sformatf("all zeros -> %0d", last_out));

      // step from -FS to +FS: group delay and saturation of the overshoot
      @(negedge clk);
      src = 1;
      t_step = cyc;
      y_prev = -8388608.0; t_prev = cyc; t_cross = -1;
      repeat (40) begin
        wait_outputs(1);
        if (t_cross < 0 && last_out >= 0) begin
          t_exact = real'(t_prev) + (0.0 - y_prev) / (real'(last_out) - y_prev) * real'(last_valid_cyc - t_prev);
          t_cross = 1;
        end
        y_prev = real'(last_out); t_prev = last_valid_cyc;
      end
      predicted = real'(t_step) + 131.0 * R;
      $display("OSR %0d: step crosses zero %0.1f clocks after the step (SINC + HBF delay %0d clocks)",
               osr, t_exact - t_step, 131 * R);
      check(t_exact - predicted > 0.0 && t_exact - predicted < osr / 2 + 40,
            $sformatf("group delay %0.1f clocks, expected about %0d", t_exact - t_step, 131 * R));

      // DC levels through the modulator
      src = 0;
      foreach (levels[li]) begin
        u = levels[li];
        wait_outputs(40);
        mean_of(16, m);
        check((m / 8388608.0 - u) < 1e-3 && (u - m / 8388608.0) < 1e-3,
              $sformatf("OSR %0d, DC %f: output %f", osr, u, m / 8388608.0));
      end

      // STOPADC
      @(negedge clk);
      en = 1'b0;
      repeat (20) @(negedge clk);
      t_prev = last_valid_cyc;
      repeat (3 * osr) @(negedge clk);
      check(last_valid_cyc == t_prev, "no output while stopped");
      if (last_valid_cyc == t_prev) n_pause++;
      en = 1'b1;
      last_valid_cyc = -1;
      wait_outputs(2);
      check_rate(osr, 3);
    end

    // OSR change on the fly (no reset): the rate follows after a few outputs
    osr_sel = 3'd0;
    wait_outputs(6);
    check_rate(64, 3);
    n_switch++;

    check(n_clip > 0, $sformatf("saturation exercised (%0d clipped samples)", n_clip));
    check(n_pause == 2, "STOPADC exercised");
    $display("clipped %0d, rate checks %0d, pauses %0d, OSR switches %0d", n_clip, n_rate_ok, n_pause, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
