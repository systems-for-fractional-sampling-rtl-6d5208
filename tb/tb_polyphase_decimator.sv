// tb_polyphase_decimator - checks the polyphase decimator against a
// direct-form FIR followed by keeping every M-th output: y[m] =
// sum_i h[i] x[mM - i]. Two instances are run: the module's default 7-tap,
// decimate-by-3 filter and the 83-tap decimate-by-5 interpolator filter of
// the low-rate coefficient set. Inputs are random, including full-scale
// values, and arrive on a random clock enable. Also checked: exactly one
// ce_out per M accepted samples, one cycle after the block-closing sample.
module tb_polyphase_decimator;
  import src_coeffs_pkg::*;

  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic signed [15:0] x = '0;
  logic signed [33:0] ya, yb;
  logic cea, ceb;
  int checks = 0, failures = 0;

  localparam int HA [7] = '{-1, 0, 9, 16, 9, 0, -1};

  polyphase_decimator u_a (
    .clk(clk), .reset(reset), .clk_enable(clk_enable), .filter_in(x),
    .filter_out(ya), .ce_out(cea)
  );
  polyphase_decimator #(.M(5), .NTAPS(I_LOW_N), .COEF(I_LOW)) u_b (
    .clk(clk), .reset(reset), .clk_enable(clk_enable), .filter_in(x),
    .filter_out(yb), .ce_out(ceb)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xs[$];

  function automatic longint fir(input int h[], input int n);
    longint acc = 0;
    for (int i = 0; i < h.size(); i++)
      if (n - i >= 0) acc += longint'(h[i]) * xs[n - i];
    return acc;
  endfunction

  int outs_a = 0, outs_b = 0;
  int prev_en_close_a = 0;

  initial begin
    int ha[], hb[];
    ha = new[7];
    foreach (ha[i]) ha[i] = HA[i];
    hb = new[I_LOW_N];
    foreach (hb[i]) hb[i] = I_LOW[i];
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic en_now;
      int n_now;
      @(negedge clk);
      clk_enable = ($urandom_range(0, 4) != 0);
      case ($urandom_range(0, 9))
        0:       x = 16'sh7fff;
        1:       x = -16'sh8000;
        default: x = 16'($urandom);
      endcase
      en_now = clk_enable;
      n_now  = xs.size();
      if (clk_enable) xs.push_back(longint'(x));
      @(posedge clk);
      #1;
      // an output is due exactly when the accepted sample index is a multiple of M
      checks += 2;
      if (cea != (en_now && (n_now % 3 == 0))) begin
        failures++; $display("FAIL ce_out A at n=%0d", n_now);
      end
      if (ceb != (en_now && (n_now % 5 == 0))) begin
        failures++; $display("FAIL ce_out B at n=%0d", n_now);
      end
      if (cea) begin
        longint e;
        e = fir(ha, n_now);
        checks++; outs_a++;
        if (longint'(ya) != e) begin
          failures++; $display("FAIL A n=%0d got=%0d exp=%0d", n_now, ya, e);
        end
      end
      if (ceb) begin
        longint e;
        e = fir(hb, n_now);
        checks++; outs_b++;
        if (longint'(yb) != e) begin
          failures++; $display("FAIL B n=%0d got=%0d exp=%0d", n_now, yb, e);
        end
      end
    end
    checks++;
    if (outs_a != (xs.size() + 2) / 3 || outs_b != (xs.size() + 4) / 5) begin
      failures++;
      $display("FAIL output counts A=%0d B=%0d for %0d inputs", outs_a, outs_b, xs.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
