// shift_add_multiplier - sequential unsigned add-and-shift multiplier.
//
// The classic one-adder multiplier: a 2W-bit product register is loaded with
// zero in its upper half and the multiplier in its lower half. In each of W
// iterations, if the product's least significant bit is 1 the multiplicand
// is added to the upper half (the W+1-bit sum keeps the carry), and then the
// whole register shifts right by one. After W iterations the register holds
// the 2W-bit product. W = 32 with a 64-bit product register follows the
// design; the start/busy/done handshake is this implementation's own.
//
// Interface: clk, reset (asynchronous, active high); start with multiplicand
// and multiplier (sampled when start is high and the unit is idle); busy,
// done (one-cycle pulse) and product.
// Timing: W + 1 cycles from the start cycle to done; product is valid from
// done until the next start.
module shift_add_multiplier #(
  parameter int W = 32
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  input  logic [W-1:0]   multiplicand,
  input  logic [W-1:0]   multiplier,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] product
);

  localparam int CW = $clog2(W + 1);

  logic [W-1:0]  mcand;
  logic [CW-1:0] iter;
  logic [W:0]    upper_sum;

  // Step 1: add the multiplicand to the left half when the product LSB is 1.
  assign upper_sum = product[0] ? ({1'b0, product[2*W-1:W]} + {1'b0, mcand})
                                : {1'b0, product[2*W-1:W]};

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      mcand   <= '0;
      iter    <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      product <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mcand   <= multiplicand;
          product <= {{W{1'b0}}, multiplier};
          iter    <= '0;
          busy    <= 1'b1;
        end
      end else begin
        // Step 2: shift the product register right, carry entering on top.
        product <= {upper_sum, product[W-1:1]};
        iter    <= iter + 1'b1;
        if (iter == CW'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
