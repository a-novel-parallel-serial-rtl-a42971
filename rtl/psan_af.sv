// psan_af: saturating activation function.
//
// The accumulator's least significant bits are dropped: its AF_IN_W most
// significant bits form the AF input (a divide by 2^(ACC_W-AF_IN_W)). That
// value passes unchanged where it fits in OUT_W bits and is clipped to the
// largest positive or negative OUT_W-bit value outside that range, i.e. a
// linear region of slope 1 between two flat saturation levels.
// Purely combinational. The dropped accumulator LSBs are intentionally
// unused inputs (a lint tool reports them as unused bits).
// The widths (12-bit input, 8-bit output) and the use of a saturation
// function follow the reference implementation; the exact breakpoints
// (at the ends of the 8-bit range) are this design's reading of it.
module psan_af #(
  parameter int unsigned ACC_W    = 17,
  parameter int unsigned AF_IN_W  = 12,
  parameter int unsigned OUT_W    = 8
) (
  input  logic signed [ACC_W-1:0] acc,
  output logic signed [OUT_W-1:0] y
);

  if (ACC_W < AF_IN_W || AF_IN_W < OUT_W) begin : g_chk_w
    $error("psan_af: need ACC_W >= AF_IN_W >= OUT_W");
  end

  localparam logic signed [AF_IN_W-1:0] MAXV = AF_IN_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [AF_IN_W-1:0] MINV = -AF_IN_W'(1 << (OUT_W - 1));

  logic signed [AF_IN_W-1:0] x;

  assign x = acc[ACC_W-1 -: AF_IN_W];

  always_comb begin
    if (x > MAXV)      y = OUT_W'(MAXV);
    else if (x < MINV) y = OUT_W'(MINV);
    else               y = OUT_W'(x);
  end

endmodule
