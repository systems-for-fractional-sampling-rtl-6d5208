// tb_frac_src_ifir - end-to-end check of the 13/15 fractional decimator with
// all three coefficient sets (high-rate and low-rate placement, and the
// r = 2^-8 worked example), side by side, against a reference model written
// as plain direct-form arithmetic: zero insertion by 13, convolution with
// the interpolator taps keeping every 5th sample, rounding division by 2^12
// with saturation to 16 bits, convolution with the model taps keeping every
// 3rd sample. The input is a sum of two tones plus noise, followed by a
// worst-case full-scale burst that saturates the low-rate inter-stage word
// (the test fails if no saturation occurs); clk_enable is held
// high so that the rates can be checked: a new input every 13 cycles, a
// stage-1 output every 5 cycles and a final output every 15 cycles.
module tb_frac_src_ifir;
  import src_coeffs_pkg::*;

  localparam int NIN  = 600;                // tone samples per run
  localparam int NPAT = 20;                 // worst-case samples appended

  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic signed [15:0] x = '0;
  logic taken_h, taken_l, taken_e, s1ce_h, s1ce_l, s1ce_e, ce_h, ce_l, ce_e;
  logic signed [15:0] s1_h, s1_l, s1_e;
  logic signed [33:0] y_h, y_l, y_e;
  int checks = 0, failures = 0;

  frac_src_ifir u_high (
    .clk(clk), .reset(reset), .clk_enable(clk_enable), .filter_in(x),
    .in_taken(taken_h), .stage1_out(s1_h), .stage1_ce(s1ce_h),
    .filter_out(y_h), .ce_out(ce_h)
  );
  frac_src_ifir #(.CONFIG(SRC_LOW_RATE)) u_low (
    .clk(clk), .reset(reset), .clk_enable(clk_enable), .filter_in(x),
    .in_taken(taken_l), .stage1_out(s1_l), .stage1_ce(s1ce_l),
    .filter_out(y_l), .ce_out(ce_l)
  );
  frac_src_ifir #(.CONFIG(SRC_EXAMPLE_R8)) u_ex (
    .clk(clk), .reset(reset), .clk_enable(clk_enable), .filter_in(x),
    .in_taken(taken_e), .stage1_out(s1_e), .stage1_ce(s1ce_e),
    .filter_out(y_e), .ce_out(ce_e)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat ((NIN + NPAT) * 13 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xin[$];
  longint out_h[$], out_l[$], out_e[$];
  int     tcyc_h[$], tcyc_l[$], tcyc_e[$], s1cyc[$], incyc[$];
  int     cyc = 0;

  int n_sat = 0;   // saturations seen by the reference re-quantiser

  function automatic longint requant(input longint v);
    longint r;
    r = (v + 2048) >>> 12;
    if (r > 32767)  begin r = 32767;  n_sat++; end
    if (r < -32768) begin r = -32768; n_sat++; end
    return r;
  endfunction

  // Reference: returns the expected outputs of the whole chain.
  function automatic void ref_chain(input int h[], input int g[], ref longint yref[$]);
    longint u[$], v[$];
    foreach (xin[n]) begin
      u.push_back(xin[n]);
      repeat (12) u.push_back(0);
    end
    for (int m = 0; m * 5 < u.size(); m++) begin
      longint acc = 0;
      for (int i = 0; i < h.size(); i++)
        if (m * 5 - i >= 0) acc += longint'(h[i]) * u[m * 5 - i];
      v.push_back(requant(acc));
    end
    for (int q = 0; q * 3 < v.size(); q++) begin
      longint acc = 0;
      for (int i = 0; i < g.size(); i++)
        if (q * 3 - i >= 0) acc += longint'(g[i]) * v[q * 3 - i];
      yref.push_back(acc);
    end
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (taken_h && !reset) begin xin.push_back(longint'(x)); incyc.push_back(cyc); end
    if (ce_h && !reset) begin out_h.push_back(longint'(y_h)); tcyc_h.push_back(cyc); end
    if (ce_l && !reset) begin out_l.push_back(longint'(y_l)); tcyc_l.push_back(cyc); end
    if (ce_e && !reset) begin out_e.push_back(longint'(y_e)); tcyc_e.push_back(cyc); end
    if (s1ce_h && !reset) s1cyc.push_back(cyc);
  end

  task automatic check_stream(input string name, ref longint got[$], ref int tc[$],
                              input int h[], input int g[]);
    longint yref[$];
    int n;
    ref_chain(h, g, yref);
    n = (got.size() < yref.size()) ? got.size() : yref.size();
    checks++;
    if (got.size() < (NIN + NPAT) * 13 / 15 - 2) begin
      failures++; $display("FAIL %s: only %0d outputs", name, got.size());
    end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (got[i] != yref[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s y[%0d] got=%0d exp=%0d", name, i, got[i], yref[i]);
      end
    end
    for (int i = 1; i < tc.size(); i++) begin
      checks++;
      if (tc[i] - tc[i-1] != 15) begin
        failures++; $display("FAIL %s output spacing %0d", name, tc[i] - tc[i-1]);
      end
    end
  endtask

  initial begin
    int hh[], gh[], hl[], gl[], he[], ge[];
    longint peak;
    hh = new[I_HIGH_N]; foreach (hh[i]) hh[i] = I_HIGH[i];
    gh = new[G_HIGH_N]; foreach (gh[i]) gh[i] = G_HIGH[i];
    hl = new[I_LOW_N];  foreach (hl[i]) hl[i] = I_LOW[i];
    gl = new[G_LOW_N];  foreach (gl[i]) gl[i] = G_LOW[i];
    he = new[I_EX_N];   foreach (he[i]) he[i] = I_EX[i];
    ge = new[G_EX_N];   foreach (ge[i]) ge[i] = G_EX[i];
    peak = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    clk_enable = 1'b1;
    // Worst case for the low-rate interpolator: full-scale samples whose
    // signs match the taps that one stage-1 output sees, which drives the
    // inter-stage word into saturation.
    begin
      int best_p, best_s, m;
      best_p = 0; best_s = -1;
      for (int p = 0; p < 13; p++) begin
        int acc;
        acc = 0;
        for (int i = p; i < I_LOW_N; i += 13) acc += (I_LOW[i] < 0) ? -I_LOW[i] : I_LOW[i];
        if (acc > best_s) begin best_s = acc; best_p = p; end
      end
      m = 0;
      while (5 * m - 13 * NIN < I_LOW_N || (5 * m) % 13 != best_p) m++;
      for (int n = 0; n < NIN + NPAT; n++) begin
        if (n < NIN) begin
          real s;
          s = 12000.0 * $sin(2.0 * 3.14159265 * 0.01 * n)
            + 8000.0 * $sin(2.0 * 3.14159265 * 0.31 * n)
            + real'($urandom_range(0, 2000)) - 1000.0;
          x = 16'(int'(s));
        end else begin
          int i;
          i = 5 * m - 13 * n;
          if (i >= 0 && i < I_LOW_N) x = (I_LOW[i] >= 0) ? 16'sh7fff : -16'sh8000;
          else x = '0;
        end
        repeat (13) @(negedge clk);
      end
    end
    clk_enable = 1'b0;
    repeat (20) @(negedge clk);
    // input rate: one sample per 13 enabled cycles
    for (int i = 1; i < incyc.size(); i++) begin
      checks++;
      if (incyc[i] - incyc[i-1] != 13) begin failures++; $display("FAIL input spacing"); end
    end
    for (int i = 1; i < s1cyc.size(); i++) begin
      checks++;
      if (s1cyc[i] - s1cyc[i-1] != 5) begin failures++; $display("FAIL stage-1 spacing"); end
    end
    check_stream("high", out_h, tcyc_h, hh, gh);
    n_sat = 0;
    check_stream("low",  out_l, tcyc_l, hl, gl);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL low-rate saturation never exercised"); end
    check_stream("example", out_e, tcyc_e, he, ge);
    foreach (out_h[i]) if (out_h[i] > peak) peak = out_h[i];
    $display("inputs=%0d outputs high=%0d low=%0d example=%0d peak=%0d low_saturations=%0d",
             xin.size(), out_h.size(), out_l.size(), out_e.size(), peak, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
