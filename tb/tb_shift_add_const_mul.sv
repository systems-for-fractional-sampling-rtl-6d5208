// tb_shift_add_const_mul - checks the fixed-coefficient shift-and-add
// multiplier against the arithmetic product for several coefficients,
// including the largest table entries, negative and extreme values, over
// random and corner-case signed 16-bit samples.
module tb_shift_add_const_mul;

  localparam int NC = 6;
  localparam int CS [NC] = '{5137, -611, 1, -1, 32767, -32768};

  logic signed [15:0] x;
  logic signed [31:0] y [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    shift_add_const_mul #(.X_W(16), .Y_W(32), .COEF(CS[i])) u_dut (.x(x), .y(y[i]));
  end

  task automatic check_all();
    #1;
    for (int i = 0; i < NC; i++) begin
      longint exp_v = longint'(x) * longint'(CS[i]);
      checks++;
      if (longint'(y[i]) != exp_v) begin
        failures++;
        $display("FAIL coef=%0d x=%0d got=%0d exp=%0d", CS[i], x, y[i], exp_v);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 16'sd0;      check_all();
    x = 16'sd32767;  check_all();
    x = -16'sd32768; check_all();
    x = -16'sd1;     check_all();
    repeat (500) begin
      x = 16'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
