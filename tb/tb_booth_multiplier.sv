// tb_booth_multiplier - checks the sequential radix-2 Booth multiplier: the
// 4-bit worked example 2 x -3 = -6 (1111 1010), exhaustive 4-bit operands,
// and corner-case and random signed 32-bit operands, each compared with the
// arithmetic product, with done W + 1 cycles after start.
module tb_booth_multiplier;

  logic clk = 1'b0, reset = 1'b1;
  logic start4 = 1'b0, start32 = 1'b0;
  logic signed [3:0]  a4 = '0, b4 = '0;
  logic signed [31:0] a32 = '0, b32 = '0;
  logic busy4, done4, busy32, done32;
  logic signed [7:0]  p4;
  logic signed [63:0] p32;
  int checks = 0, failures = 0;

  booth_multiplier #(.W(4)) u_small (
    .clk(clk), .reset(reset), .start(start4), .multiplicand(a4), .multiplier(b4),
    .busy(busy4), .done(done4), .product(p4)
  );
  booth_multiplier u_dut (
    .clk(clk), .reset(reset), .start(start32), .multiplicand(a32), .multiplier(b32),
    .busy(busy32), .done(done32), .product(p32)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run4(input logic signed [3:0] a, input logic signed [3:0] b);
    int cycles = 0;
    @(negedge clk); a4 = a; b4 = b; start4 = 1'b1;
    @(negedge clk); start4 = 1'b0;
    cycles = 1;
    while (!done4) begin @(negedge clk); cycles++; end
    checks += 2;
    if (p4 != 8'(int'(a) * int'(b))) begin failures++; $display("FAIL4 %0d*%0d=%0d", a, b, p4); end
    if (cycles != 5) begin failures++; $display("FAIL4 latency %0d", cycles); end
  endtask

  task automatic run32(input logic signed [31:0] a, input logic signed [31:0] b);
    int cycles = 0;
    @(negedge clk); a32 = a; b32 = b; start32 = 1'b1;
    @(negedge clk); start32 = 1'b0; a32 = 32'($urandom); b32 = 32'($urandom);
    cycles = 1;
    while (!done32) begin @(negedge clk); cycles++; end
    checks += 2;
    if (p32 != longint'(a) * longint'(b)) begin
      failures++; $display("FAIL32 %0d*%0d got %0d", a, b, p32);
    end
    if (cycles != 33) begin failures++; $display("FAIL32 latency %0d", cycles); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    run4(4'sd2, -4'sd3);
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++) run4(4'(a), 4'(b));
    run32(32'h8000_0000, 32'h8000_0000);
    run32(32'h8000_0000, 32'h7fff_ffff);
    run32(32'h7fff_ffff, 32'h8000_0000);
    run32(-32'sd1, -32'sd1);
    run32(32'sd0, -32'sd5);
    repeat (200) run32(32'($urandom), 32'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
