// polyphase_decimator - multiplierless FIR decimator by M in polyphase form.
//
// H(z) = sum_k z^-k E_k(z^M): the NTAPS-tap filter is split into M branches,
// branch k holding taps h[k], h[k+M], h[k+2M], ... (P = ceil(NTAPS/M) taps).
// A commutator steers input sample x[n] into branch (-n mod M), so every
// branch delay line moves only once per M inputs and all branch filters run
// at the low (output) rate. When the sample for branch 0 arrives, which
// closes a block of M inputs, all M*P branch products are summed and one
// output is written: y[m] = sum_k sum_j h[jM+k] x[(m-j)M-k]. The products
// use fixed-coefficient shift-and-add multipliers, so the filter contains no
// general multiplier. The first sample after reset goes to branch 0 and so
// yields the first output; from then on every M-th accepted sample does.
// This polyphase structure and the 16-bit input / 16-bit coefficient /
// 34-bit output words follow the design; the branch ordering, the reset
// and the register placement are this implementation's choice.
//
// Interface: clk, reset (asynchronous, active high), clk_enable (input
// sample strobe), filter_in; filter_out (full precision, OUT_W bits) with
// ce_out, a one-cycle strobe for every new output.
// Timing: filter_out / ce_out appear one cycle after the enabled cycle that
// delivers the branch-0 sample; one output per M enabled input cycles.
module polyphase_decimator #(
  parameter int IN_W  = 16,
  parameter int COEF_W = 16,
  parameter int OUT_W = 34,
  parameter int M     = 3,
  parameter int NTAPS = 7,
  parameter int COEF [NTAPS] = '{-1, 0, 9, 16, 9, 0, -1}
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic                    clk_enable,
  input  logic signed [IN_W-1:0]  filter_in,
  output logic signed [OUT_W-1:0] filter_out,
  output logic                    ce_out
);

  localparam int P    = (NTAPS + M - 1) / M;       // taps per branch
  localparam int PW   = IN_W + COEF_W;             // product word
  localparam int PHW  = (M > 1) ? $clog2(M) : 1;

  function automatic int coef_at(int idx);
    return (idx < NTAPS) ? COEF[idx] : 0;
  endfunction

  // dl[k][j] holds x[(m-j)M-k] once block m is complete.
  logic signed [IN_W-1:0]  dl   [M][P];
  logic signed [IN_W-1:0]  tap  [M][P];   // delay lines as seen by the sum
  logic signed [PW-1:0]    prod [M][P];
  logic signed [OUT_W-1:0] sum;
  logic [PHW-1:0]          phase;          // branch of the next input sample
  logic                    block_done;

  assign block_done = clk_enable && (phase == '0);

  // Branch 0 is summed with the sample arriving in this cycle shifted in.
  always_comb begin
    for (int k = 0; k < M; k++)
      for (int j = 0; j < P; j++)
        tap[k][j] = dl[k][j];
    tap[0][0] = filter_in;
    for (int j = 1; j < P; j++)
      tap[0][j] = dl[0][j-1];
  end

  for (genvar k = 0; k < M; k++) begin : g_branch
    for (genvar j = 0; j < P; j++) begin : g_tap
      if (coef_at(j*M + k) != 0) begin : g_mul
        shift_add_const_mul #(
          .X_W (IN_W),
          .Y_W (PW),
          .COEF(coef_at(j*M + k))
        ) u_mul (
          .x(tap[k][j]),
          .y(prod[k][j])
        );
      end else begin : g_zero
        assign prod[k][j] = '0;
      end
    end
  end

  always_comb begin
    sum = '0;
    for (int k = 0; k < M; k++)
      for (int j = 0; j < P; j++)
        sum = sum + OUT_W'(prod[k][j]);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int k = 0; k < M; k++)
        for (int j = 0; j < P; j++)
          dl[k][j] <= '0;
      phase      <= '0;
      filter_out <= '0;
      ce_out     <= 1'b0;
    end else begin
      ce_out <= block_done;
      if (clk_enable) begin
        for (int j = P - 1; j > 0; j--)
          dl[phase][j] <= dl[phase][j-1];
        dl[phase][0] <= filter_in;
        phase <= (phase == '0) ? PHW'(M - 1) : phase - 1'b1;
      end
      if (block_done) filter_out <= sum;
    end
  end

endmodule
