// tb_expander - checks the up-by-13 expander: each input sample is taken on
// every 13th enabled cycle (x_taken), passed on once and followed by twelve
// zeros, with the output registered one cycle later; idle cycles
// (clk_enable low) must not advance the phase.
module tb_expander;

  localparam int L = 13;

  logic clk = 1'b0, reset = 1'b1, clk_enable = 1'b0;
  logic signed [15:0] x_in = '0, y_out;
  logic x_taken, y_valid;
  int checks = 0, failures = 0;

  expander #(.W(16), .L(L)) u_dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int en_count = 0;          // enabled cycles so far
  int taken_count = 0;
  logic signed [15:0] exp_q[$];

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      clk_enable = ($urandom_range(0, 3) != 0);
      x_in = 16'($urandom);
      #1;
      checks++;
      if (x_taken != (clk_enable && (en_count % L == 0))) begin
        failures++;
        $display("FAIL x_taken=%0b at enabled cycle %0d", x_taken, en_count);
      end
      if (clk_enable) begin
        exp_q.push_back((en_count % L == 0) ? x_in : 16'sd0);
        if (x_taken) taken_count++;
        en_count++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (y_valid != clk_enable) begin
        failures++;
        $display("FAIL y_valid=%0b clk_enable=%0b", y_valid, clk_enable);
      end
      if (y_valid) begin
        logic signed [15:0] e;
        e = exp_q.pop_front();
        checks++;
        if (y_out != e) begin
          failures++;
          $display("FAIL y_out=%0d exp=%0d", y_out, e);
        end
      end
    end
    checks++;
    if (taken_count != (en_count + L - 1) / L) begin
      failures++;
      $display("FAIL taken=%0d enabled=%0d", taken_count, en_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
