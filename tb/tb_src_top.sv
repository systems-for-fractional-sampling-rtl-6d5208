// tb_src_top - end-to-end test of the top level at its default parameters
// (high-rate placement, 32-bit multipliers). It streams a two-tone signal
// with noise through the fractional decimator and compares every output with
// a direct-form reference (zero insertion by 13, interpolator FIR kept every
// 5th sample, rounding to 16 bits, model FIR kept every 3rd sample), checks
// the 13-cycle input and 15-cycle output spacing, and meanwhile runs the
// add-and-shift and Booth multipliers on random operands. It counts how often
// each mechanism occurred (samples taken, zeros inserted, stage-1 and stage-2
// decimated outputs, unsigned and signed multiplications, Booth add and
// subtract steps) and fails for any that never did.
module tb_src_top;
  import src_coeffs_pkg::*;

  localparam int NIN = 300;

  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic signed [15:0] filter_in = '0, stage1_out;
  logic in_taken, stage1_ce, ce_out;
  logic signed [33:0] filter_out;
  logic sam_start = 1'b0, sam_busy, sam_done;
  logic [31:0] sam_multiplicand = '0, sam_multiplier = '0;
  logic [63:0] sam_product;
  logic booth_start = 1'b0, booth_busy, booth_done;
  logic signed [31:0] booth_multiplicand = '0, booth_multiplier = '0;
  logic signed [63:0] booth_product;
  int checks = 0, failures = 0;
  logic src_done = 1'b0, mul_done = 1'b0;

  src_top u_dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NIN * 13 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- fractional decimator ----------------
  longint xin[$], yout[$];
  int incyc[$], s1cyc[$], ocyc[$];
  int cyc = 0;
  int n_zero_inserted = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_taken && !reset) begin xin.push_back(longint'(filter_in)); incyc.push_back(cyc); end
    else if (clk_enable && !reset) n_zero_inserted++;
    if (stage1_ce && !reset) s1cyc.push_back(cyc);
    if (ce_out && !reset) begin yout.push_back(longint'(filter_out)); ocyc.push_back(cyc); end
  end

  function automatic longint requant(input longint v);
    longint r;
    r = (v + 2048) >>> 12;
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic check_src();
    longint u[$], v[$], yref[$];
    foreach (xin[n]) begin
      u.push_back(xin[n]);
      repeat (12) u.push_back(0);
    end
    for (int m = 0; m * 5 < u.size(); m++) begin
      longint acc = 0;
      for (int i = 0; i < I_HIGH_N; i++)
        if (m * 5 - i >= 0) acc += longint'(I_HIGH[i]) * u[m * 5 - i];
      v.push_back(requant(acc));
    end
    for (int q = 0; q * 3 < v.size(); q++) begin
      longint acc = 0;
      for (int i = 0; i < G_HIGH_N; i++)
        if (q * 3 - i >= 0) acc += longint'(G_HIGH[i]) * v[q * 3 - i];
      yref.push_back(acc);
    end
    checks++;
    if (yout.size() != (NIN * 13 + 14) / 15) begin
      failures++; $display("FAIL %0d outputs for %0d inputs", yout.size(), xin.size());
    end
    for (int i = 0; i < yout.size() && i < yref.size(); i++) begin
      checks++;
      if (yout[i] != yref[i]) begin
        failures++;
        if (failures < 10) $display("FAIL y[%0d] got=%0d exp=%0d", i, yout[i], yref[i]);
      end
    end
    for (int i = 1; i < incyc.size(); i++) begin
      checks++; if (incyc[i] - incyc[i-1] != 13) failures++;
    end
    for (int i = 1; i < s1cyc.size(); i++) begin
      checks++; if (s1cyc[i] - s1cyc[i-1] != 5) failures++;
    end
    for (int i = 1; i < ocyc.size(); i++) begin
      checks++; if (ocyc[i] - ocyc[i-1] != 15) failures++;
    end
  endtask

  initial begin : src_stim
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    clk_enable = 1'b1;
    for (int n = 0; n < NIN; n++) begin
      real s;
      s = 14000.0 * $sin(2.0 * 3.14159265 * 0.02 * n)
        + 9000.0 * $sin(2.0 * 3.14159265 * 0.27 * n)
        + real'($urandom_range(0, 4000)) - 2000.0;
      filter_in = 16'(int'(s));
      repeat (13) @(negedge clk);
    end
    clk_enable = 1'b0;
    repeat (10) @(negedge clk);
    src_done = 1'b1;
  end

  // ---------------- multipliers ----------------
  int n_sam = 0, n_booth = 0, n_booth_add = 0, n_booth_sub = 0;

  initial begin : mul_stim
    @(negedge reset);
    repeat (150) begin
      logic [31:0] a, b;
      logic signed [31:0] sa, sb;
      a = 32'($urandom); b = 32'($urandom);
      sa = 32'($urandom); sb = 32'($urandom);
      @(negedge clk);
      sam_multiplicand = a; sam_multiplier = b; sam_start = 1'b1;
      booth_multiplicand = sa; booth_multiplier = sb; booth_start = 1'b1;
      for (int i = 0; i < 32; i++) begin
        logic cur, prev;
        cur = sb[i];
        prev = (i == 0) ? 1'b0 : sb[i-1];
        if (cur && !prev) n_booth_sub++;
        if (!cur && prev) n_booth_add++;
      end
      @(negedge clk);
      sam_start = 1'b0; booth_start = 1'b0;
      while (!(sam_done && booth_done)) @(negedge clk);
      checks += 2;
      if (sam_product != 64'(a) * 64'(b)) begin
        failures++; $display("FAIL sam %0d*%0d", a, b);
      end
      if (booth_product != longint'(sa) * longint'(sb)) begin
        failures++; $display("FAIL booth %0d*%0d", sa, sb);
      end
      n_sam++; n_booth++;
    end
    mul_done = 1'b1;
  end

  initial begin : finish
    wait (src_done && mul_done);
    check_src();
    $display("mechanisms: samples_taken=%0d zeros_inserted=%0d stage1_outputs=%0d stage2_outputs=%0d",
             xin.size(), n_zero_inserted, s1cyc.size(), yout.size());
    $display("mechanisms: add_shift_mults=%0d booth_mults=%0d booth_add_steps=%0d booth_sub_steps=%0d",
             n_sam, n_booth, n_booth_add, n_booth_sub);
    checks += 6;
    if (xin.size() == 0)        begin failures++; $display("FAIL no input sample taken"); end
    if (n_zero_inserted == 0)   begin failures++; $display("FAIL no zero inserted"); end
    if (s1cyc.size() == 0)      begin failures++; $display("FAIL no stage-1 decimation"); end
    if (yout.size() == 0)       begin failures++; $display("FAIL no stage-2 decimation"); end
    if (n_sam == 0 || n_booth == 0) begin failures++; $display("FAIL no multiplication"); end
    if (n_booth_add == 0 || n_booth_sub == 0) begin failures++; $display("FAIL Booth steps missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
