// tb_tmr_reg: self-checking testbench of the triplicated register.
// Loads random words, checks hold and reset, then flips one copy at a time
// (a simulated single event upset) and checks that the voted output never
// shows it and that the copy is repaired at the next clock edge. A register
// with TMR = 0 is checked to show the same upset, as a contrast.
`timescale 1ns / 1ps
module tb_tmr_reg;
  localparam int W = 16;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [W-1:0] d = '0, q, q1;
  int checks = 0, failures = 0, upsets_masked = 0;

  tmr_reg #(.W(W)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));
  tmr_reg #(.W(W), .TMR(1'b0)) plain (.clk(clk), .rst(rst), .en(en), .d(d), .q(q1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] expect_q, bad;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(q == '0 && q1 == '0, "reset value");
    expect_q = '0;
    for (int it = 0; it < 60; it++) begin
      d  = W'($urandom);
      en = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (en) expect_q = d;
      check(q == expect_q, $sformatf("load/hold: q=%h expected %h", q, expect_q));
      check(q1 == expect_q, "plain register load/hold");
      // upset one copy of the triplicated register
      bad = expect_q ^ W'(1 << ($urandom % W));
      en  = 1'b0;
      case (it % 3)
        0: force dut.g_copy[0].r = bad;
        1: force dut.g_copy[1].r = bad;
        default: force dut.g_copy[2].r = bad;
      endcase
      force plain.g_copy[0].r = bad;
      #1;
      check(q == expect_q, $sformatf("upset masked: q=%h expected %h", q, expect_q));
      check(q1 == bad, "plain register shows the upset");
      if (q == expect_q) upsets_masked++;
      release dut.g_copy[0].r;
      release dut.g_copy[1].r;
      release dut.g_copy[2].r;
      release plain.g_copy[0].r;
      @(posedge clk); #1;
      check(dut.g_copy[0].r == expect_q && dut.g_copy[1].r == expect_q &&
            dut.g_copy[2].r == expect_q, "upset scrubbed at the next edge");
      // reload the plain register, which has no voter to repair it
      en = 1'b1;
      d  = expect_q;
      @(posedge clk); #1;
    end
    rst = 1'b1;
    @(posedge clk); #1;
    check(q == '0, "synchronous reset");
    check(upsets_masked == 60, "every upset was masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
