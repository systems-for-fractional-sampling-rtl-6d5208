// frac_src_ifir - multiplierless fractional decimator by L/(M1*M2) = 13/15
// built from an IFIR (interpolated FIR) filter pair.
//
// The anti-imaging / anti-aliasing filter H(z) of an up-by-L, down-by-M
// converter is replaced by an IFIR cascade H(z) = G(z^M1) I(z). With the noble
// identity the expanded model filter G(z^M1) moves behind the first
// down-sampler, which gives the chain
//
//   x --> up-by-L --> Sh{I_r}(z), down-by-M1 --> Sh{G_r}(z), down-by-M2 --> y
//
// Both filters are rounded (integer coefficients) and sharpened with
// 3H^2 - 2H^3, and both are realised as polyphase decimators whose branch
// filters run at their output rate and multiply by shift-and-add only.
// Between the stages the 34-bit interpolator output is re-quantised to the
// 16-bit input word of the model filter (divide by 2^INTER_SHIFT, round,
// saturate; this gain of 8 recovers most of the 1/13 loss of zero insertion).
//
// CONFIG selects the coefficient set: SRC_HIGH_RATE (default) for the
// converter placed ahead of the integer decimator (67-tap filters, the smaller
// structure), SRC_LOW_RATE for the converter placed behind it (83-tap
// interpolator, 277-tap model filter), SRC_EXAMPLE_R8 for the smaller worked
// example rounded with r = 2^-8 and sharpened as H^3 (154 / 37 taps).
// L = 13, M1 = 5, M2 = 3, the 16/34-bit words and the three filter sets follow
// the design; the re-quantisation and the handshake are this implementation's.
//
// Interface: clk, reset (asynchronous, active high), clk_enable (one enabled
// cycle per high-rate sample, i.e. L per input sample); filter_in with
// in_taken (the cycle in which filter_in is sampled, once every L enabled
// cycles); filter_out (34 bits, full precision) with ce_out, and the
// intermediate stage-1 result stage1_out / stage1_ce.
// Timing: one output per M1*M2 = 15 enabled cycles, i.e. 13 outputs per 15
// input samples. The stage-1 output appears 2 cycles after the enabled cycle
// that completes its block; filter_out 1 cycle after the stage-1 output that
// completes its block.
module frac_src_ifir
  import src_coeffs_pkg::*;
#(
  parameter int L           = 13,
  parameter int M1          = 5,
  parameter int M2          = 3,
  parameter src_config_e CONFIG = SRC_HIGH_RATE,
  parameter int INTER_SHIFT = 12
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic signed [IN_W-1:0]  filter_in,
  output logic                    in_taken,
  output logic signed [IN_W-1:0]  stage1_out,
  output logic                    stage1_ce,
  output logic signed [OUT_W-1:0] filter_out,
  output logic                    ce_out
);

  logic signed [IN_W-1:0]  up_sample;
  logic                    up_valid;
  logic signed [OUT_W-1:0] s1_full;

  expander #(.W(IN_W), .L(L)) u_expander (
    .clk       (clk),
    .reset     (reset),
    .clk_enable(clk_enable),
    .x_in      (filter_in),
    .x_taken   (in_taken),
    .y_out     (up_sample),
    .y_valid   (up_valid)
  );

  case (CONFIG)
    SRC_LOW_RATE: begin : g_low
      polyphase_decimator #(
        .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .M(M1), .NTAPS(I_LOW_N), .COEF(I_LOW)
      ) u_interp (
        .clk(clk), .reset(reset), .clk_enable(up_valid), .filter_in(up_sample),
        .filter_out(s1_full), .ce_out(stage1_ce)
      );
      polyphase_decimator #(
        .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .M(M2), .NTAPS(G_LOW_N), .COEF(G_LOW)
      ) u_model (
        .clk(clk), .reset(reset), .clk_enable(stage1_ce), .filter_in(stage1_out),
        .filter_out(filter_out), .ce_out(ce_out)
      );
    end
    SRC_EXAMPLE_R8: begin : g_example
      polyphase_decimator #(
        .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .M(M1), .NTAPS(I_EX_N), .COEF(I_EX)
      ) u_interp (
        .clk(clk), .reset(reset), .clk_enable(up_valid), .filter_in(up_sample),
        .filter_out(s1_full), .ce_out(stage1_ce)
      );
      polyphase_decimator #(
        .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .M(M2), .NTAPS(G_EX_N), .COEF(G_EX)
      ) u_model (
        .clk(clk), .reset(reset), .clk_enable(stage1_ce), .filter_in(stage1_out),
        .filter_out(filter_out), .ce_out(ce_out)
      );
    end
    default: begin : g_high
      polyphase_decimator #(
        .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .M(M1), .NTAPS(I_HIGH_N), .COEF(I_HIGH)
      ) u_interp (
        .clk(clk), .reset(reset), .clk_enable(up_valid), .filter_in(up_sample),
        .filter_out(s1_full), .ce_out(stage1_ce)
      );
      polyphase_decimator #(
        .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .M(M2), .NTAPS(G_HIGH_N), .COEF(G_HIGH)
      ) u_model (
        .clk(clk), .reset(reset), .clk_enable(stage1_ce), .filter_in(stage1_out),
        .filter_out(filter_out), .ce_out(ce_out)
      );
    end
  endcase

  sat_round #(.IN_W(OUT_W), .OUT_W(IN_W), .SHIFT(INTER_SHIFT)) u_requant (
    .x(s1_full),
    .y(stage1_out)
  );

endmodule
