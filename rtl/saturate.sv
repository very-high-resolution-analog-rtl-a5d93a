// saturate: clamps the last half-band filter output to the 24-bit word that
// is sent out.
//
// A signed IN_W-bit sample that does not fit in OUT_W bits is replaced by the
// nearest OUT_W-bit limit (+2^(OUT_W-1)-1 or -2^(OUT_W-1)); in-range samples
// pass unchanged. This matters because the half-band filters overshoot on
// signals close to full scale. The valid strobe passes with the data; the
// block is purely combinational (zero latency). clipped flags a clamped
// sample. The 25-to-24-bit widths are the document's; the rest is this
// design's own.
`timescale 1ns / 1ps
module saturate #(
  parameter int IN_W  = 25,
  parameter int OUT_W = 24
) (
  input  logic signed [IN_W-1:0]  din,
  input  logic                    din_valid,
  output logic signed [OUT_W-1:0] dout,
  output logic                    dout_valid,
  output logic                    clipped
);

  localparam logic signed [IN_W-1:0] MAXV = IN_W'((1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(1 <<< (OUT_W - 1));

  always_comb begin
    clipped = 1'b0;
    if (din > MAXV) begin
      dout    = {1'b0, {(OUT_W-1){1'b1}}};
      clipped = din_valid;
    end else if (din < MINV) begin
      dout    = {1'b1, {(OUT_W-1){1'b0}}};
      clipped = din_valid;
    end else begin
      dout    = din[OUT_W-1:0];
    end
  end

  assign dout_valid = din_valid;

endmodule
