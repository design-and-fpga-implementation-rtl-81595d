// tb_cla_adder: compares the 32-bit carry-lookahead adder with integer
// addition, carry-in and carry-out included, on corner and random operands.
module tb_cla_adder;
  logic [31:0] a, b, s;
  logic cin, cout;
  logic clk = 0;
  int checks = 0, failures = 0;

  cla_adder dut (.a, .b, .cin, .s, .cout);

  always #5 clk = ~clk;

  task automatic try(input logic [31:0] va, input logic [31:0] vb, input logic vc);
    logic [32:0] exp;
    exp = {1'b0, va} + {1'b0, vb} + 33'(vc);
    a = va; b = vb; cin = vc;
    #1 checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h expected %h", va, vb, vc, cout, s, exp);
    end
  endtask

  initial begin
    try(0, 0, 0); try(32'hFFFF_FFFF, 0, 1); try(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1);
    try(32'h0000_000F, 32'h0000_0001, 0); try(32'h7FFF_FFFF, 1, 0);
    for (int i = 0; i < 32; i++) try(32'hFFFF_FFFF >> i, 32'h1, 0);
    for (int i = 0; i < 3000; i++) try($urandom, $urandom, 1'($urandom));
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
