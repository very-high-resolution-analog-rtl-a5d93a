// tb_serial_tx: self-checking testbench of the serial output interface.
// Random 24-bit words are offered at random intervals, down to back-to-back
// pairs that must pass through the one-word buffer. A receiver model samples
// DATA on each rising CLKOUT edge while VALID is high, rebuilds the words MSB
// first and compares them, in order, with those sent. Also checked: CLKOUT is
// the clock divided by two, DATA/VALID change only after a falling CLKOUT
// edge, and VALID stays high for a whole number of 24-bit words of 48
// clocks each (words sent back to back share one VALID pulse).
`timescale 1ns / 1ps
module tb_serial_tx;
  localparam int W = 24;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] din = '0;
  logic din_valid = 1'b0;
  logic data, valid, clkout;
  int checks = 0, failures = 0, n_rx = 0, n_buffered = 0;

  serial_tx #(.W(W)) dut (.clk(clk), .rst(rst), .din(din), .din_valid(din_valid),
                          .data(data), .valid(valid), .clkout(clkout));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] sent [$];
  logic [W-1:0] word;
  int bits = 0, clk_cnt = 0, valid_start = 0;
  logic prev_clkout = 1'b0, prev_data = 1'b0, prev_valid = 1'b0;

  // receiver
  always @(posedge clkout) begin
    if (rst) begin
      bits = 0;
    end else if (valid) begin
      word = {word[W-2:0], data};
      bits++;
      if (bits == W) begin
        check(sent.size() > 0, "word received that was never sent");
        if (sent.size() > 0) begin
          check(word == sent[0], $sformatf("word %0d: got %h expected %h", n_rx, word, sent[0]));
          void'(sent.pop_front());
        end
        n_rx++;
        bits = 0;
      end
    end else begin
      check(bits == 0, $sformatf("VALID dropped inside a word (%0d bits, t=%0t)", bits, $time));
      bits = 0;
    end
  end

  // clocking and framing rules, sampled on the system clock
  always @(posedge clk) begin
    #1;
    clk_cnt++;
    if (!rst) begin
      check(clkout != prev_clkout, "CLKOUT toggles every clock");
      if (data != prev_data || valid != prev_valid)
        check(prev_clkout == 1'b1 && clkout == 1'b0, "DATA/VALID change with the falling CLKOUT edge");
      if (valid && !prev_valid) valid_start = clk_cnt;
      if (!valid && prev_valid)
        check((clk_cnt - valid_start) % (2 * W) == 0 && clk_cnt > valid_start,
              $sformatf("VALID high for %0d clocks", clk_cnt - valid_start));
    end
    prev_clkout = clkout;
    prev_data   = data;
    prev_valid  = valid;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      int gap;
      gap = (i % 10 == 9) ? 1 + $urandom % 20 : 2 * W + 2 + $urandom % 60;
      if (gap < 2 * W) n_buffered++;
      repeat (gap) @(negedge clk);
      din = W'($urandom);
      din_valid = 1'b1;
      sent.push_back(din);
      @(negedge clk);
      din_valid = 1'b0;
      if (gap < 2 * W) repeat (4 * W) @(negedge clk);   // let the pair drain
    end
    repeat (6 * W) @(negedge clk);
    check(n_rx == 200, $sformatf("received %0d of 200 words", n_rx));
    check(n_buffered > 0, "buffered words exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
