// booth_multiplier - sequential radix-2 Booth multiplier for signed operands.
//
// The signed counterpart of the add-and-shift multiplier. The product register
// holds {A, Q, q_1}: A starts at zero, Q holds the multiplier and q_1 is an
// extra bit to the right of it, initially 0. In each of W iterations the pair
// {Q[0], q_1} decides the step: 10 (start of a run of ones) subtracts the
// multiplicand from A, 01 (end of a run) adds it, 00 and 11 (inside a run)
// leave A alone. The register then shifts right arithmetically, keeping the
// sign of the intermediate result. After W iterations {A, Q} is the signed
// 2W-bit product. A is one bit wider than the operands so that adding or
// subtracting the most negative multiplicand cannot overflow; that guard bit
// and the start/busy/done handshake are this implementation's choices.
//
// Interface: clk, reset (asynchronous, active high); start with multiplicand
// and multiplier (two's complement, sampled when start is high and the unit
// is idle); busy, done (one-cycle pulse) and product (two's complement).
// Timing: W + 1 cycles from the start cycle to done.
module booth_multiplier #(
  parameter int W = 32
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  start,
  input  logic signed [W-1:0]   multiplicand,
  input  logic signed [W-1:0]   multiplier,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*W-1:0] product
);

  localparam int CW = $clog2(W + 1);

  logic signed [W:0]   mcand;
  logic signed [W:0]   acc;      // A
  logic        [W-1:0] q;        // Q
  logic                q_1;
  logic        [CW-1:0] iter;
  logic signed [W:0]   acc_next;

  always_comb begin
    unique case ({q[0], q_1})
      2'b10:   acc_next = acc - mcand;
      2'b01:   acc_next = acc + mcand;
      default: acc_next = acc;
    endcase
  end

  assign product = {acc[W-1:0], q};

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      mcand <= '0;
      acc   <= '0;
      q     <= '0;
      q_1   <= 1'b0;
      iter  <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mcand <= (W+1)'(multiplicand);
          acc   <= '0;
          q     <= multiplier;
          q_1   <= 1'b0;
          iter  <= '0;
          busy  <= 1'b1;
        end
      end else begin
        // Arithmetic shift right of {A, Q, q_1}.
        acc  <= acc_next >>> 1;
        q    <= {acc_next[0], q[W-1:1]};
        q_1  <= q[0];
        iter <= iter + 1'b1;
        if (iter == CW'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
