// tb_sign_extend: compares the 16-to-32-bit extension with the arithmetic
// value of the input, for the corner values and random inputs.
module tb_sign_extend;
  logic [15:0] in;
  logic [31:0] out;
  int checks = 0, failures = 0;
  logic clk = 0;

  sign_extend dut (.in, .out);

  always #5 clk = ~clk;

  task automatic try(input logic [15:0] v);
    int exp;
    in = v;
    exp = (v >= 16'h8000) ? int'(v) - 65536 : int'(v);
    #1 checks++;
    if (out !== 32'(exp)) begin
      failures++;
      $display("FAIL in=%h out=%h expected %h", v, out, 32'(exp));
    end
  endtask

  initial begin
    try(16'h0000); try(16'h0001); try(16'h7FFF); try(16'h8000); try(16'hFFFF);
    for (int i = 0; i < 500; i++) try(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
