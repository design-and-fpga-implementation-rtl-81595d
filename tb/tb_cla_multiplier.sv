// tb_cla_multiplier: compares the low 32 bits of the array product with
// integer multiplication, for signed and unsigned corner values and random
// operands.
module tb_cla_multiplier;
  logic [31:0] a, b, p;
  logic clk = 0;
  int checks = 0, failures = 0;

  cla_multiplier dut (.a, .b, .p);

  always #5 clk = ~clk;

  task automatic try(input logic [31:0] va, input logic [31:0] vb);
    logic [63:0] exp;
    exp = {32'h0, va} * {32'h0, vb};
    a = va; b = vb;
    #1 checks++;
    if (p !== exp[31:0]) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", va, vb, p, exp[31:0]);
    end
  endtask

  initial begin
    try(0, 0); try(1, 1); try(2, 4); try(3, 6); try(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    try(32'hFFFF_FFFE, 3);     // -2 * 3 = -6
    try(32'h8000_0000, 2); try(32'h0001_0000, 32'h0001_0000);
    for (int i = 0; i < 2000; i++) try($urandom, $urandom);
    for (int i = 0; i < 500; i++) try($urandom & 32'hFFFF, $urandom & 32'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
