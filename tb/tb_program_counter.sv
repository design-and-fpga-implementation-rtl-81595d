// tb_program_counter: checks reset to 0 and that the PC takes pc_next on
// each rising edge, and holds it for the rest of the cycle.
module tb_program_counter;
  logic clk = 0, rst;
  logic [31:0] pc_next, pc;
  int checks = 0, failures = 0;

  program_counter dut (.clk, .rst, .pc_next, .pc);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (pc !== exp) begin
      failures++;
      $display("FAIL %s: pc=%h expected %h", what, pc, exp);
    end
  endtask

  initial begin
    rst = 1; pc_next = 32'hDEAD_BEEF;
    @(posedge clk); #1 check(32'h0, "reset");
    @(posedge clk); #1 check(32'h0, "reset held");
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      logic [31:0] v;
      v = $urandom;
      pc_next = v;
      @(posedge clk); #1 check(v, "load");
      pc_next = ~v;
      #3 check(v, "hold within cycle");
    end
    pc_next = 32'h44;
    rst = 1;
    @(posedge clk); #1 check(32'h0, "reset mid-run");
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
