// rst_sync: reset synchroniser for the digital part of the ADC.
//
// The external active-low reset may change at any time; the digital blocks see
// an active-high reset that is asserted as soon as rst_n falls (asynchronous
// assertion) and released only on a rising clock edge, STAGES clocks after
// rst_n has risen (synchronous release). Like every flip-flop of the chip, the
// synchroniser chain is triplicated and its output is the majority of the
// three chains.
//
// Synchronising the reset with the clock and triplicating flip-flops follow
// the document; asynchronous assertion, the chain length and the active levels
// are this design's choices.
`timescale 1ns / 1ps
module rst_sync #(
  parameter int STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low
  output logic rst      // synchronous release, active high
);

  logic [2:0] last;

  for (genvar i = 0; i < 3; i++) begin : g_chain
    logic [STAGES-1:0] sr;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sr <= '1;
      else        sr <= {sr[STAGES-2:0], 1'b0};
    end
    assign last[i] = sr[STAGES-1];
  end

  assign rst = (last[0] & last[1]) | (last[0] & last[2]) | (last[1] & last[2]);

endmodule
