// tb_clk_phase_gen: self-checking testbench of the clock phase generator model.
// Runs the 6.144 MHz master clock and checks, at every edge of every phase:
// PHI1 and PHI2 (and their delayed copies) never overlap; each delayed phase
// rises with its phase and falls TD = 3 ns after it; the complements are
// exact; and each phase pulses exactly once per master clock period.
`timescale 1ns / 1ps
module tb_clk_phase_gen;
  localparam realtime TCLK = 162.76ns;   // 6.144 MHz
  logic mclk = 1'b0;
  logic phi1, phi1_n, phi1d, phi1d_n, phi2, phi2_n, phi2d, phi2d_n;
  int checks = 0, failures = 0, n_mclk = 0, n_phi1 = 0, n_phi2 = 0;
  realtime t_phi1_fall, t_phi2_fall;

  clk_phase_gen dut (.mclk(mclk), .phi1(phi1), .phi1_n(phi1_n), .phi1d(phi1d), .phi1d_n(phi1d_n),
                     .phi2(phi2), .phi2_n(phi2_n), .phi2d(phi2d), .phi2d_n(phi2d_n));

  always #(TCLK / 2) mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge mclk) n_mclk++;
  always @(posedge phi1) begin
    n_phi1++;
    #0.01;
    check(!phi2 && !phi2d, "PHI1 rises while PHI2 phases are low");
    check(phi1d, "PHI1D rises with PHI1");
  end
  always @(posedge phi2) begin
    n_phi2++;
    #0.01;
    check(!phi1 && !phi1d, "PHI2 rises while PHI1 phases are low");
    check(phi2d, "PHI2D rises with PHI2");
  end
  always @(negedge phi1)  t_phi1_fall = $realtime;
  always @(negedge phi2)  t_phi2_fall = $realtime;
  always @(negedge phi1d) check($realtime - t_phi1_fall > 2.99ns && $realtime - t_phi1_fall < 3.01ns,
                                 $sformatf("PHI1D falls %0.3f ns after PHI1", $realtime - t_phi1_fall));
  always @(negedge phi2d) check($realtime - t_phi2_fall > 2.99ns && $realtime - t_phi2_fall < 3.01ns,
                                 $sformatf("PHI2D falls %0.3f ns after PHI2", $realtime - t_phi2_fall));

  // overlap and complement monitor, sampled finely
  initial begin
    forever begin
      #0.5ns;
      check(!((phi1 || phi1d) && (phi2 || phi2d)), "phases overlap");
      check(phi1_n == !phi1 && phi1d_n == !phi1d && phi2_n == !phi2 && phi2d_n == !phi2d,
            "complements");
    end
  end

  initial begin
    #(TCLK * 200);
    #1;
    check(n_phi1 == n_mclk, $sformatf("PHI1 pulses %0d for %0d clocks", n_phi1, n_mclk));
    check(n_phi2 == n_mclk || n_phi2 == n_mclk - 1, $sformatf("PHI2 pulses %0d for %0d clocks", n_phi2, n_mclk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
