// src_top - top level: the 13/15 IFIR fractional decimator of a GSM software
// radio receiver, plus the two sequential multiplier units of the design.
//
// The fractional decimator (frac_src_ifir) is the signal path. In the
// recommended high-rate placement it runs on the 13x up-sampled rate and feeds
// an integer decimator by M0 = 256, which is not part of this RTL: its input
// is the filter_out / ce_out pair brought out here. CONFIG = SRC_LOW_RATE
// selects the coefficient set for the other placement, where the integer
// decimator comes first and drives filter_in; SRC_EXAMPLE_R8 selects the
// smaller r = 2^-8 worked example.
//
// The add-and-shift multiplier (unsigned) and the Booth multiplier (signed)
// are general multiplication units for operands that are not constants. They
// are not on the filter path, whose coefficients are fixed and therefore
// multiplied by wired shifts and adds; they stand beside it with their own
// ports.
//
// Interface: see the port groups below. All logic uses clk and the
// asynchronous, active-high reset.
// Timing: the decimator delivers one 34-bit output per 15 enabled cycles
// (13 outputs per 15 input samples); each multiplier takes W + 1 cycles.
module src_top
  import src_coeffs_pkg::*;
#(
  parameter src_config_e CONFIG = SRC_HIGH_RATE,
  parameter int MUL_W     = 32
) (
  input  logic                    clk,
  input  logic                    reset,
  // fractional decimator
  input  logic                    clk_enable,
  input  logic signed [IN_W-1:0]  filter_in,
  output logic                    in_taken,
  output logic signed [IN_W-1:0]  stage1_out,
  output logic                    stage1_ce,
  output logic signed [OUT_W-1:0] filter_out,
  output logic                    ce_out,
  // add-and-shift multiplier (unsigned)
  input  logic                    sam_start,
  input  logic [MUL_W-1:0]        sam_multiplicand,
  input  logic [MUL_W-1:0]        sam_multiplier,
  output logic                    sam_busy,
  output logic                    sam_done,
  output logic [2*MUL_W-1:0]      sam_product,
  // Booth multiplier (signed)
  input  logic                    booth_start,
  input  logic signed [MUL_W-1:0] booth_multiplicand,
  input  logic signed [MUL_W-1:0] booth_multiplier,
  output logic                    booth_busy,
  output logic                    booth_done,
  output logic signed [2*MUL_W-1:0] booth_product
);

  frac_src_ifir #(.CONFIG(CONFIG)) u_src (
    .clk       (clk),
    .reset     (reset),
    .clk_enable(clk_enable),
    .filter_in (filter_in),
    .in_taken  (in_taken),
    .stage1_out(stage1_out),
    .stage1_ce (stage1_ce),
    .filter_out(filter_out),
    .ce_out    (ce_out)
  );

  shift_add_multiplier #(.W(MUL_W)) u_sam (
    .clk         (clk),
    .reset       (reset),
    .start       (sam_start),
    .multiplicand(sam_multiplicand),
    .multiplier  (sam_multiplier),
    .busy        (sam_busy),
    .done        (sam_done),
    .product     (sam_product)
  );

  booth_multiplier #(.W(MUL_W)) u_booth (
    .clk         (clk),
    .reset       (reset),
    .start       (booth_start),
    .multiplicand(booth_multiplicand),
    .multiplier  (booth_multiplier),
    .busy        (booth_busy),
    .done        (booth_done),
    .product     (booth_product)
  );

endmodule
