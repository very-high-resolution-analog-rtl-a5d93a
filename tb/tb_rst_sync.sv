// tb_rst_sync: self-checking testbench of the reset synchroniser.
// Checks that reset asserts as soon as rst_n falls, even between clock edges,
// that it is released exactly STAGES rising edges after rst_n rises, and
// that the release always coincides with a rising clock edge.
`timescale 1ns / 1ps
module tb_rst_sync;
  localparam int STAGES = 2;
  logic clk = 1'b0, rst_n = 1'b1, rst;
  int checks = 0, failures = 0;

  rst_sync #(.STAGES(STAGES)) dut (.clk(clk), .rst_n(rst_n), .rst(rst));

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

  // rst may only fall right after a rising clock edge
  always @(negedge rst) check(clk == 1'b1, "release aligned with a rising edge");

  initial begin
    #2 rst_n = 1'b0;                          // power-on reset pulse, before any clock edge
    #1;
    check(rst == 1'b1, "reset asserted before the first clock edge");
    for (int it = 0; it < 20; it++) begin
      repeat (3) @(posedge clk);
      repeat (1 + $urandom % 8) #1;            // release between edges
      rst_n = 1'b1;
      for (int e = 1; e <= STAGES; e++) begin
        @(posedge clk); #1;
        check(rst == (e < STAGES), $sformatf("release after %0d edges (edge %0d rst=%0b)", STAGES, e, rst));
      end
      repeat ($urandom % 5) @(posedge clk);
      repeat (1 + $urandom % 8) #1;            // assert between edges
      rst_n = 1'b0;
      #0.5;
      check(rst == 1'b1, "asynchronous assertion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
