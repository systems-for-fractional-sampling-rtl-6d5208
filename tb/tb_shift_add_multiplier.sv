// tb_shift_add_multiplier - checks the sequential unsigned add-and-shift
// multiplier: the 4-bit worked example 0010 x 0011 = 0000 0110, corner cases
// and random operands on the 32-bit default unit, each product compared with
// the arithmetic product, and the done pulse W + 1 cycles after start.
module tb_shift_add_multiplier;

  logic clk = 1'b0, reset = 1'b1;
  logic start4 = 1'b0, start32 = 1'b0;
  logic [3:0]  a4 = '0, b4 = '0;
  logic [31:0] a32 = '0, b32 = '0;
  logic busy4, done4, busy32, done32;
  logic [7:0]  p4;
  logic [63:0] p32;
  int checks = 0, failures = 0;

  shift_add_multiplier #(.W(4)) u_small (
    .clk(clk), .reset(reset), .start(start4), .multiplicand(a4), .multiplier(b4),
    .busy(busy4), .done(done4), .product(p4)
  );
  shift_add_multiplier u_dut (
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

  task automatic run4(input logic [3:0] a, input logic [3:0] b);
    int cycles = 0;
    @(negedge clk); a4 = a; b4 = b; start4 = 1'b1;
    @(negedge clk); start4 = 1'b0;
    cycles = 1;
    while (!done4) begin @(negedge clk); cycles++; end
    checks += 2;
    if (p4 != 8'(a) * 8'(b)) begin failures++; $display("FAIL4 %0d*%0d=%0d", a, b, p4); end
    if (cycles != 5) begin failures++; $display("FAIL4 latency %0d", cycles); end
  endtask

  task automatic run32(input logic [31:0] a, input logic [31:0] b);
    int cycles = 0;
    @(negedge clk); a32 = a; b32 = b; start32 = 1'b1;
    @(negedge clk); start32 = 1'b0; a32 = 32'($urandom); b32 = 32'($urandom);
    cycles = 1;
    while (!done32) begin @(negedge clk); cycles++; end
    checks += 2;
    if (p32 != 64'(a) * 64'(b)) begin
      failures++; $display("FAIL32 %0d*%0d got %0d", a, b, p32);
    end
    if (cycles != 33) begin failures++; $display("FAIL32 latency %0d", cycles); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    run4(4'b0010, 4'b0011);
    run4(4'hf, 4'hf);
    for (int a = 0; a < 16; a++) run4(4'(a), 4'($urandom));
    run32(32'hffff_ffff, 32'hffff_ffff);
    run32(32'h0, 32'h1234_5678);
    run32(32'h8000_0000, 32'h2);
    repeat (200) run32(32'($urandom), 32'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
