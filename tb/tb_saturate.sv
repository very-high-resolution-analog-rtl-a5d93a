// tb_saturate: self-checking testbench of the 25-to-24-bit saturation stage.
// Applies the limits, the values just inside and outside them, and random
// values over the whole 25-bit range, and compares with a clamp computed in
// integer arithmetic.
`timescale 1ns / 1ps
module tb_saturate;
  localparam int IN_W = 25, OUT_W = 24;
  logic signed [IN_W-1:0]  din;
  logic                    din_valid;
  logic signed [OUT_W-1:0] dout;
  logic                    dout_valid, clipped;
  int checks = 0, failures = 0, n_clip = 0;

  saturate #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (
    .din(din), .din_valid(din_valid), .dout(dout), .dout_valid(dout_valid), .clipped(clipped)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint v);
    longint lim_hi, lim_lo, e;
    lim_hi = (64'sd1 <<< (OUT_W - 1)) - 1;
    lim_lo = -(64'sd1 <<< (OUT_W - 1));
    e = (v > lim_hi) ? lim_hi : (v < lim_lo) ? lim_lo : v;
    din = IN_W'(v);
    din_valid = 1'($urandom % 2);
    #1;
    check(longint'(dout) == e, $sformatf("in %0d out %0d expected %0d", v, dout, e));
    check(clipped == (din_valid && e != v), "clip flag");
    check(dout_valid == din_valid, "valid passes");
    if (clipped) n_clip++;
  endtask

  initial begin
    automatic longint edges [8] = '{8388607, 8388608, -8388608, -8388609, 16777215, -16777216, 0, -1};
    foreach (edges[i]) apply(edges[i]);
    for (int i = 0; i < 2000; i++) apply(longint'($signed(IN_W'($urandom))));
    check(n_clip > 0, "some samples clipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
