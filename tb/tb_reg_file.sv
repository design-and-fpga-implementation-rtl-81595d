// tb_reg_file: reset clears all 32 registers; random writes and reads on both
// ports are compared with an array model; register 0 holds data like any
// other; the observation output matches the model.
module tb_reg_file;
  logic clk = 0, rst, we;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic [31:0][31:0] regs;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd, .regs);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      model[i] = '0;
      check(regs[i], 32'h0, "reset");
    end
    // write register 0 and read it back
    @(negedge clk); we = 1; wa = 0; wd = 32'h1; model[0] = 32'h1;
    @(negedge clk); we = 0; ra1 = 0;
    #1 check(rd1, 32'h1, "r0 is writable");
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      we  = 1'($urandom);
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      check(rd1, model[ra1], "port 1");
      check(rd2, model[ra2], "port 2");
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 32; i++) check(regs[i], model[i], "observation");
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
