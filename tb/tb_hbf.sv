// tb_hbf: self-checking testbench of the half-band decimation filter, run on
// all four configurations (HBF1..HBF4) side by side.
// Each filter receives random samples at random spacings down to the
// shortest allowed one (K + 1 clocks; 4 clocks for HBF1 as at OSR 64), in
// stretches of small values and of full-range values (the latter drive the
// output into saturation where the output is narrower than the input). The
// reference is a direct-form convolution over all N + 1 taps (zeros and the
// centre tap 1/2 included) in 64-bit integers, kept at every second input,
// rounded and clamped. Also checked: exactly one output per two inputs, the
// latency of K + 1 clocks, and that the filter passes a constant with gain 1.
`timescale 1ns / 1ps
module tb_hbf;
  import adc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int IW [4] = '{SINC_OUT_W, HBF1_OUT_W, HBF2_OUT_W, HBF3_OUT_W};
  localparam int OW [4] = '{HBF1_OUT_W, HBF2_OUT_W, HBF3_OUT_W, HBF4_OUT_W};

  int done_mask = 0;
  int sat_seen [4];

  for (genvar g = 0; g < 4; g++) begin : g_f
    localparam int STAGE = g + 1;
    localparam int N     = hbf_order(STAGE);
    localparam int K     = hbf_ntaps(STAGE);
    localparam int IN_W  = IW[g];
    localparam int OUT_W = OW[g];
    localparam int NIN   = 600;

    logic                    in_valid = 1'b0;
    logic signed [IN_W-1:0]  din = '0;
    logic                    dout_valid;
    logic signed [OUT_W-1:0] dout;

    hbf #(.STAGE(STAGE), .IN_W(IN_W), .OUT_W(OUT_W)) dut (
      .clk(clk), .rst(rst), .in_valid(in_valid), .din(din),
      .dout_valid(dout_valid), .dout(dout)
    );

    longint x [NIN];
    longint h [N+1];
    int     n_in = 0, n_outs = 0, pair_edge = -1, edge_no = 0;

    function automatic longint ref_out(input int newest);
      longint acc = 0, y, hi, lo;
      for (int i = 0; i <= N; i++) if (newest - i >= 0) acc += h[i] * x[newest - i];
      y  = (acc + (64'sd1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
      hi = (64'sd1 <<< (OUT_W - 1)) - 1;
      lo = -(64'sd1 <<< (OUT_W - 1));
      return (y > hi) ? hi : (y < lo) ? lo : y;
    endfunction

    // output checker
    always @(posedge clk) begin
      edge_no <= edge_no + 1;
      if (!rst && dout_valid) begin
        // dout_valid rose K + 1 edges after the pair's second input edge and
        // is sampled here, one edge later
        check(pair_edge >= 0 && edge_no - pair_edge == K + 2,
              $sformatf("HBF%0d latency %0d, expected %0d", STAGE, edge_no - pair_edge - 1, K + 1));
        check(longint'(dout) == ref_out(2 * n_outs + 1),
              $sformatf("HBF%0d output %0d: %0d expected %0d", STAGE, n_outs, dout, ref_out(2 * n_outs + 1)));
        if (dout == {1'b0, {(OUT_W-1){1'b1}}} || dout == {1'b1, {(OUT_W-1){1'b0}}}) sat_seen[g]++;
        n_outs <= n_outs + 1;
      end
    end

    initial begin
      int gap;
      longint v;
      for (int i = 0; i <= N; i++) h[i] = 0;
      h[N/2] = 64'sd1 <<< (COEF_FRAC - 1);
      for (int k = 0; k < K; k++) begin
        h[N/2 - (2*k + 1)] = longint'(hbf_coef(STAGE, k));
        h[N/2 + (2*k + 1)] = longint'(hbf_coef(STAGE, k));
      end
      wait (!rst);
      for (int i = 0; i < NIN; i++) begin
        gap = K + 1 + (($urandom % 4 == 0) ? 0 : $urandom % 5);
        if (STAGE == 1 && $urandom % 2 == 0) gap = 4;
        repeat (gap - 1) @(negedge clk);
        if (i >= NIN - 2 * N - 4)      v = 64'sd1 <<< (IN_W - 3);                     // constant
        else if ((i / 100) % 2 == 0)   v = longint'($signed(IN_W'($urandom)));          // full range
        else                           v = longint'($signed(IN_W'($urandom))) >>> 6;    // small
        x[i]     = v;
        din      = IN_W'(v);
        in_valid = 1'b1;
        @(posedge clk);
        if (i % 2 == 1) pair_edge = edge_no;
        @(negedge clk);
        in_valid = 1'b0;
      end
      repeat (K + 4) @(negedge clk);
      check(n_outs == NIN / 2, $sformatf("HBF%0d gave %0d outputs for %0d inputs", STAGE, n_outs, NIN));
      check(longint'(dout) == (64'sd1 <<< (IN_W - 3)), $sformatf("HBF%0d DC gain 1: %0d", STAGE, dout));
      done_mask |= 1 << g;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (done_mask == 15);
    check(sat_seen[1] > 0 && sat_seen[3] > 0, "output saturation exercised in HBF2 and HBF4");
    $display("saturated outputs per filter: %0d %0d %0d %0d", sat_seen[0], sat_seen[1], sat_seen[2], sat_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
