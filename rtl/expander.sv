// expander - sample-rate expander (up-sampler) by an integer factor L.
//
// The design runs on one clock whose enabled cycles (clk_enable) form the
// high, L-times sample rate. Every L-th enabled cycle the expander takes the
// input sample (x_taken pulses in that cycle so the source can advance) and
// passes it on; in the other L-1 enabled cycles it emits zeros. This is the
// zero insertion of the up-sampler ahead of the anti-imaging / anti-aliasing
// filter. L = 13 is the GSM conversion factor of the design.
//
// Interface: clk, reset (asynchronous, active high), clk_enable,
// x_in / x_taken on the input side, y_out / y_valid on the output side.
// Timing: y_out and y_valid are registered, one cycle after the enabled
// cycle that produced them; y_valid follows clk_enable.
module expander #(
  parameter int W = 16,
  parameter int L = 13
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                clk_enable,
  input  logic signed [W-1:0] x_in,
  output logic                x_taken,
  output logic signed [W-1:0] y_out,
  output logic                y_valid
);

  localparam int CW = (L > 1) ? $clog2(L) : 1;

  logic [CW-1:0] phase;

  assign x_taken = clk_enable && (phase == '0);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      phase   <= '0;
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= clk_enable;
      if (clk_enable) begin
        y_out <= (phase == '0) ? x_in : '0;
        phase <= (phase == CW'(L - 1)) ? '0 : phase + 1'b1;
      end
    end
  end

endmodule
