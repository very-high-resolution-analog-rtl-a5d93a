// serial_tx: serial output interface of the ADC.
//
// Each W-bit sample from the decimator is sent MSB first on DATA, framed by
// VALID, together with a bit clock CLKOUT. CLKOUT runs continuously at half
// the system clock. DATA and VALID change only just after a falling CLKOUT
// edge, so a receiver samples them on the rising CLKOUT edge, half a bit
// period after they changed. VALID is high while the W bits of a word are on
// DATA; when a buffered word follows immediately, VALID stays high and the
// receiver frames the words by counting W bits from the rising edge of VALID.
// One word takes 2 W system clocks (48 for 24 bits),
// which fits into the shortest sample interval of the ADC (64 clocks at
// OSR 64).
//
// A sample arriving while a word is being sent is held in a one-word buffer
// and sent next; a sample arriving while that buffer is full replaces the
// buffered word (overrun, flagged by an assertion).
//
// That each sample leaves as a 24-bit word with a clock and the pin names
// DATA, VALID and CLKOUT are the document's; the bit order, framing, clock
// ratio and buffering are this design's choices. All state is kept in
// tmr_reg.
`timescale 1ns / 1ps
module serial_tx #(
  parameter int W   = 24,
  parameter bit TMR = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic         din_valid,
  output logic         data,
  output logic         valid,
  output logic         clkout
);

  localparam int CW = $clog2(W + 1);

  typedef struct packed {
    logic          ph;       // CLKOUT level
    logic [W-1:0]  buffer;   // next word
    logic          full;     // buffer holds a word
    logic [W-1:0]  shreg;    // word being sent, MSB at the top
    logic [CW-1:0] left;     // bits still to send after the current one
    logic          sending;
  } state_t;

  state_t s, s_n;

  tmr_reg #(.W($bits(state_t)), .TMR(TMR)) u_state (
    .clk(clk), .rst(rst), .en(1'b1), .d(s_n), .q(s)
  );

  always_comb begin
    s_n    = s;
    s_n.ph = ~s.ph;

    if (din_valid) begin
      s_n.buffer = din;
      s_n.full   = 1'b1;
    end

    // CLKOUT is about to fall: present the next bit
    if (s.ph) begin
      if (s.sending && s.left != '0) begin
        s_n.shreg = {s.shreg[W-2:0], 1'b0};
        s_n.left  = s.left - 1'b1;
      end else if (s.full) begin
        s_n.shreg   = s.buffer;
        s_n.left    = CW'(W - 1);
        s_n.sending = 1'b1;
        s_n.full    = din_valid;   // a word arriving now stays buffered
      end else begin
        s_n.sending = 1'b0;
      end
    end
  end

  assign data   = s.sending & s.shreg[W-1];
  assign valid  = s.sending;
  assign clkout = s.ph;

  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
                                 din_valid |-> !(s.full && !(s.ph && !(s.sending && s.left != '0))))
    else $error("serial_tx: sample overwritten before it was sent");

endmodule
