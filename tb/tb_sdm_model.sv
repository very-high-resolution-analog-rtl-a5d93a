// tb_sdm_model: self-checking testbench of the behavioural sigma-delta
// modulator model, clocked by two clock phase generator models as in the ADC.
// For a set of DC inputs it checks that the density of ones in the output
// stream, mapped to +-1 and averaged over 4096 clocks, equals the input
// normalised to VREF within 0.003 (a second-order loop keeps the integrators
// bounded, so the average error shrinks as 1/N). It also checks that an
// offset on the first amplifier is removed when correlated double sampling
// is on and shifts the average by offset/VREF when it is off, that the
// integrator states stay bounded, and that the sampled input carries thermal
// noise of the rms expected for the default 0.7 pF at 323 K,
// sqrt(8 k T / C) = 225.7 uV, within 5 %.
`timescale 1ns / 1ps
module tb_sdm_model;
  localparam realtime TCLK = 162.76ns;
  localparam real VREF = 3.3, VOFF = 0.165;
  localparam int NAVG = 4096;
  logic mclk = 1'b0;
  real inap = 1.65, inan = 1.65;
  int checks = 0, failures = 0;

  always #(TCLK / 2) mclk = ~mclk;

  logic p1a, p1na, p1da, p1dna, p2a, p2na, p2da, p2dna;
  logic p1b, p1nb, p1db, p1dnb, p2b, p2nb, p2db, p2dnb;
  clk_phase_gen u_gen1 (.mclk(mclk), .phi1(p1a), .phi1_n(p1na), .phi1d(p1da), .phi1d_n(p1dna),
                        .phi2(p2a), .phi2_n(p2na), .phi2d(p2da), .phi2d_n(p2dna));
  clk_phase_gen u_gen2 (.mclk(mclk), .phi1(p1b), .phi1_n(p1nb), .phi1d(p1db), .phi1d_n(p1dnb),
                        .phi2(p2b), .phi2_n(p2nb), .phi2d(p2db), .phi2d_n(p2dnb));

  logic s_nom, s_cds, s_nocds;
  sdm_model dut (.inap(inap), .inan(inan), .vref(VREF), .vcm(1.65), .mclk(mclk),
                 .phi1d_1(p1da), .phi2_1(p2a), .phi1d_2(p1db), .phi2_2(p2b), .sigma(s_nom));
  sdm_model #(.CDS(1'b1), .OFFSET1(VOFF)) u_cds (
                 .inap(inap), .inan(inan), .vref(VREF), .vcm(1.65), .mclk(mclk),
                 .phi1d_1(p1da), .phi2_1(p2a), .phi1d_2(p1db), .phi2_2(p2b), .sigma(s_cds));
  sdm_model #(.CDS(1'b0), .OFFSET1(VOFF)) u_nocds (
                 .inap(inap), .inan(inan), .vref(VREF), .vcm(1.65), .mclk(mclk),
                 .phi1d_1(p1da), .phi2_1(p2a), .phi1d_2(p1db), .phi2_2(p2b), .sigma(s_nocds));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real max_x1 = 0.0, max_x2 = 0.0;
  always @(posedge mclk) begin
    if (dut.x1 > max_x1 || -dut.x1 > max_x1) max_x1 = (dut.x1 > 0.0) ? dut.x1 : -dut.x1;
    if (dut.x2 > max_x2 || -dut.x2 > max_x2) max_x2 = (dut.x2 > 0.0) ? dut.x2 : -dut.x2;
  end

  // sampling noise: every input sample of the default instance minus the
  // applied differential input
  localparam real VN = 225.7e-6;
  real n_sum = 0.0, n_sq = 0.0;
  int  n_cnt = 0;
  always @(negedge p1da) begin
    real e;
    #0.01;
    e = dut.u_s * VREF - (inap - inan);
    if (e < 20.0 * VN && e > -20.0 * VN) begin
      n_sum += e; n_sq += e * e; n_cnt++;
    end
  end

  initial begin
    automatic real levels [7] = '{0.0, 0.1, -0.25, 0.4, -0.6, 0.75, 0.003};
    real m_nom, m_cds, m_nocds, u;
    foreach (levels[i]) begin
      u    = levels[i];
      inap = 1.65 + u * VREF / 2.0;
      inan = 1.65 - u * VREF / 2.0;
      repeat (200) @(posedge mclk);
      m_nom = 0.0; m_cds = 0.0; m_nocds = 0.0;
      for (int n = 0; n < NAVG; n++) begin
        @(posedge mclk);
        #1;
        m_nom   += s_nom   ? 1.0 : -1.0;
        m_cds   += s_cds   ? 1.0 : -1.0;
        m_nocds += s_nocds ? 1.0 : -1.0;
      end
      m_nom /= NAVG; m_cds /= NAVG; m_nocds /= NAVG;
      check(m_nom - u < 0.003 && u - m_nom < 0.003, $sformatf("input %f: mean %f", u, m_nom));
      check(m_cds - u < 0.003 && u - m_cds < 0.003, $sformatf("CDS on, input %f: mean %f", u, m_cds));
      check(m_nocds - u - VOFF / VREF < 0.003 && u + VOFF / VREF - m_nocds < 0.003,
            $sformatf("CDS off, input %f: mean %f", u, m_nocds));
    end
    check(max_x1 < 2.0 && max_x2 < 4.0, $sformatf("integrators bounded: %f %f", max_x1, max_x2));
    begin
      automatic real rms = $sqrt(n_sq / n_cnt);
      $display("sampling noise: %0d samples, rms %e V, mean %e V", n_cnt, rms, n_sum / n_cnt);
      check(n_cnt > 25000, "noise samples collected");
      check(rms > 0.95 * VN && rms < 1.05 * VN, "sampling noise rms");
      check(n_sum / n_cnt < 0.05 * VN && n_sum / n_cnt > -0.05 * VN, "sampling noise mean");
    end
    $display("max |x1| %f, max |x2| %f", max_x1, max_x2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
