// tmr_reg: radiation-hardened register built by triple modular redundancy.
//
// Every flip-flop of the digital part is stored three times and read through a
// bitwise two-out-of-three majority voter, so that a single event upset in one
// copy never reaches the output. Each copy reloads the voted value when the
// register is not being written, which scrubs an upset away at the next clock
// edge instead of letting it wait for a second upset.
//
// Interface: d is captured on the rising clock edge when en is high; q is the
// voted value. rst is synchronous and loads RST_VAL into all copies.
// TMR = 0 builds a single plain register (for comparison or area studies).
// Triplication and voting follow the document; scrubbing through the voter
// and the synchronous reset are this design's choices. A synthesis flow must
// keep the three copies (no register merging) for the protection to survive.
`timescale 1ns / 1ps
module tmr_reg #(
  parameter int            W       = 1,
  parameter bit            TMR     = 1'b1,
  parameter logic [W-1:0]  RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  localparam int N = TMR ? 3 : 1;

  logic [W-1:0] copy [N];

  for (genvar i = 0; i < N; i++) begin : g_copy
    logic [W-1:0] r;
    always_ff @(posedge clk) begin
      if (rst)     r <= RST_VAL;
      else if (en) r <= d;
      else         r <= q;
    end
    assign copy[i] = r;
  end

  if (TMR) begin : g_vote
    assign q = (copy[0] & copy[1]) | (copy[0] & copy[2]) | (copy[1] & copy[2]);
  end else begin : g_single
    assign q = copy[0];
  end

endmodule
