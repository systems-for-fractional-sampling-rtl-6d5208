// shift_add_const_mul - multiplierless product of a signed sample and a fixed
// integer coefficient.
//
// The coefficient is a parameter, so the product is built from shifts and
// adds only: for every bit set in |COEF| a copy of the sample shifted by that
// bit position is added, and the sum is negated when COEF is negative. This is
// the add-and-shift multiplication the design uses in place of hardware
// multipliers, with signed data handled by working on the magnitude of the
// coefficient and re-applying its sign afterwards. The sample keeps its own
// two's-complement sign, so no recoding of the data path is needed.
//
// Interface: x (X_W bits, signed) in, y (Y_W bits, signed) out.
// Timing: purely combinational, no clock.
module shift_add_const_mul #(
  parameter int X_W  = 16,
  parameter int Y_W  = 32,
  parameter int COEF = 3
) (
  input  logic signed [X_W-1:0] x,
  output logic signed [Y_W-1:0] y
);

  localparam int MAG = (COEF < 0) ? -COEF : COEF;

  logic signed [Y_W-1:0] x_ext;
  logic signed [Y_W-1:0] acc;

  assign x_ext = Y_W'(x);

  always_comb begin
    acc = '0;
    for (int b = 0; b < 31; b++) begin
      if (((MAG >> b) & 1) == 1) acc = acc + (x_ext <<< b);
    end
    y = (COEF < 0) ? -acc : acc;
  end

endmodule
