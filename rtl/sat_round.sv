// sat_round - re-quantises a full-precision filter output to a shorter word.
//
// The input is divided by 2^SHIFT with rounding to nearest (half rounds up,
// by adding 2^(SHIFT-1) before the arithmetic shift) and clipped to the
// signed range of OUT_W bits. It sits between the interpolator-filter stage,
// whose output is 34 bits, and the model-filter stage, whose input is 16 bits.
// The shift amount, the rounding and the saturation are this design's choice.
//
// Interface: x (IN_W bits, signed) in, y (OUT_W bits, signed) out.
// Timing: combinational.
module sat_round #(
  parameter int IN_W  = 34,
  parameter int OUT_W = 16,
  parameter int SHIFT = 12
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  localparam logic signed [IN_W:0] HALF = (SHIFT > 0) ? ((IN_W+1)'(1) <<< (SHIFT - 1)) : '0;
  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IN_W:0] MINV = -MAXV - 1;

  logic signed [IN_W:0] rnd;

  always_comb begin
    rnd = ((IN_W+1)'(x) + HALF) >>> SHIFT;
    if (rnd > MAXV)      y = MAXV[OUT_W-1:0];
    else if (rnd < MINV) y = MINV[OUT_W-1:0];
    else                 y = rnd[OUT_W-1:0];
  end

endmodule
