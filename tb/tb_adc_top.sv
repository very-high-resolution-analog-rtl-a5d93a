// tb_adc_top: end-to-end testbench of the whole ADC at its default
// parameters, with the nominal 6.144 MHz master clock.
// A differential DC voltage is applied to INAP/INAN; a receiver model
// deserialises DATA on the rising CLKOUT edges while VALID is high and time-
// stamps each 24-bit word. Checked:
//   - the decoded word equals (INAP - INAN) / VREF * 2^23 within 3e-4 of
//     full scale, at OSR 1024 (6 kHz), OSR 64 (96 kHz) and OSR 2048;
//   - words arrive exactly OSR master clocks apart;
//   - the density of ones on SIGMA matches the input;
//   - STOPADC stops the words and they resume when it is released;
//   - a full-scale step drives the saturation stage (CLIPPED);
//   - the 30-bit SINC accumulators wrap around in normal operation.
// Each mechanism is counted and one that never happened is a failure.
`timescale 1ns / 1ps
module tb_adc_top;
  localparam realtime TCLK = 162.76ns;
  localparam real VREF = 3.3, VCM = 1.65;

  logic mclk = 1'b0, rst_n = 1'b0, stopadc = 1'b0;
  logic [2:0] osr = 3'd4;
  real inap = VCM, inan = VCM;
  logic sigma, data, valid, clkout, clipped;
  int checks = 0, failures = 0;

  adc_top dut (.inap(inap), .inan(inan), .vref(VREF), .vcm(VCM), .mclk(mclk), .rst_n(rst_n),
               .osr(osr), .stopadc(stopadc), .sigma(sigma), .data(data), .valid(valid),
               .clkout(clkout), .clipped(clipped));

  always #(TCLK / 2) mclk = ~mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  int n_words = 0, n_clip = 0, n_wrap = 0, n_stop = 0, n_osr_switch = 0, n_rate = 0;
  longint cyc = 0, word_cyc = 0, prev_word_cyc = 0;
  logic signed [23:0] word, last_word;
  int bits = 0;

  initial begin
    #400ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // master clock cycle counter, clip and wrap-around monitors
  logic [1:0] acc_top_prev = 2'b00;
  always @(posedge mclk) begin
    cyc++;
    if (clipped) n_clip++;
    if (acc_top_prev == 2'b01 && dut.u_dec.u_sinc.s.acc[3][29:28] == 2'b10) n_wrap++;
    if (acc_top_prev == 2'b10 && dut.u_dec.u_sinc.s.acc[3][29:28] == 2'b01) n_wrap++;
    acc_top_prev = dut.u_dec.u_sinc.s.acc[3][29:28];
  end

  // serial receiver
  always @(posedge clkout) begin
    if (!rst_n || !valid) begin
      bits = 0;
    end else begin
      word = {word[22:0], data};
      bits++;
      if (bits == 24) begin
        last_word     = word;
        prev_word_cyc = word_cyc;
        word_cyc      = cyc;
        n_words++;
        bits = 0;
      end
    end
  end

  task automatic set_input(input real u);
    inap = VCM + u * VREF / 2.0;
    inan = VCM - u * VREF / 2.0;
  endtask

  task automatic wait_words(input int n);
    int target;
    target = n_words + n;
    while (n_words < target) @(posedge mclk);
  endtask

  task automatic check_level(input real u, input int osr_val);
    real m, ones;
    int  n1;
    wait_words(4);
    m = 0.0;
    for (int i = 0; i < 8; i++) begin
      wait_words(1);
      m += real'(last_word);
      check(word_cyc - prev_word_cyc == longint'(osr_val),
            $sformatf("word interval %0d clocks, OSR %0d", word_cyc - prev_word_cyc, osr_val));
      if (word_cyc - prev_word_cyc == longint'(osr_val)) n_rate++;
    end
    m = m / 8.0 / 8388608.0;
    check(m - u < 3e-4 && u - m < 3e-4, $sformatf("OSR %0d, input %f: output %f", osr_val, u, m));
    $display("OSR %0d: input %f of VREF -> output %f of full scale", osr_val, u, m);
    n1 = 0;
    for (int i = 0; i < 4096; i++) begin
      @(posedge mclk);
      #1;
      n1 += sigma;
    end
    ones = 2.0 * real'(n1) / 4096.0 - 1.0;
    check(ones - u < 0.003 && u - ones < 0.003, $sformatf("SIGMA density %f for input %f", ones, u));
  endtask

  initial begin
    longint t0;
    int w0;
    set_input(0.5);
    repeat (10) @(posedge mclk);
    #1 rst_n = 1'b1;

    // nominal configuration: OSR 1024, 6 kHz output at 6.144 MHz
    wait_words(30);
    check_level(0.5, 1024);
    set_input(-0.2);
    wait_words(30);
    check_level(-0.2, 1024);

    // suspend the decimator
    stopadc = 1'b1;
    t0 = cyc;
    while (cyc < t0 + 200) @(posedge mclk);   // a word already under way may finish
    w0 = n_words;
    t0 = cyc;
    while (cyc < t0 + 5000) @(posedge mclk);
    check(n_words == w0, "no words while STOPADC is high");
    if (n_words == w0) n_stop++;
    stopadc = 1'b0;
    wait_words(3);
    check(n_words > w0, "words resume after STOPADC");

    // fastest rate: OSR 64, 96 kHz
    osr = 3'd0;
    n_osr_switch++;
    set_input(0.3);
    wait_words(40);
    check_level(0.3, 64);

    // full-scale step: overshoot clamped by the saturation stage
    set_input(-1.0);
    wait_words(40);
    set_input(1.0);
    wait_words(40);
    check(last_word == 24'sh7fffff || last_word > 24'sh7f0000, $sformatf("full scale -> %0d", last_word));

    // slowest rate: OSR 2048
    osr = 3'd5;
    n_osr_switch++;
    set_input(0.1);
    wait_words(30);
    check_level(0.1, 2048);

    check(n_stop > 0, "STOPADC exercised");
    check(n_osr_switch == 2, "OSR switches exercised");
    check(n_clip > 0, $sformatf("saturation exercised (%0d)", n_clip));
    check(n_wrap > 0, $sformatf("SINC accumulator wrap-around exercised (%0d)", n_wrap));
    check(n_rate > 0, "word rate checked");
    $display("words %0d, clipped %0d, accumulator wraps %0d, stops %0d, OSR switches %0d",
             n_words, n_clip, n_wrap, n_stop, n_osr_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
