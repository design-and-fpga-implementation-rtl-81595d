// tb_mac_unit: runs random sequences of multiply, multiply-accumulate and
// idle cycles and checks the combinational result and the accumulator
// against a model; also checks reset of the accumulator and a worked
// dot product (1*4 + 2*5 + 3*6 = 32).
module tb_mac_unit;
  logic clk = 0, rst, en, accumulate;
  logic [31:0] a, b, y, acc;
  logic [31:0] m_acc, ey;
  int checks = 0, failures = 0;

  mac_unit dut (.clk, .rst, .a, .b, .en, .accumulate, .y, .acc);

  always #5 clk = ~clk;

  task automatic step(input logic [31:0] va, input logic [31:0] vb,
                      input logic ven, input logic vacc);
    @(negedge clk);
    a = va; b = vb; en = ven; accumulate = vacc;
    ey = vacc ? m_acc + va * vb : va * vb;
    #1 checks++;
    if (y !== ey) begin
      failures++;
      $display("FAIL y=%h expected %h (a=%h b=%h acc=%b)", y, ey, va, vb, vacc);
    end
    @(posedge clk);
    if (ven) m_acc = ey;
    #1 checks++;
    if (acc !== m_acc) begin
      failures++;
      $display("FAIL acc=%h expected %h", acc, m_acc);
    end
  endtask

  initial begin
    rst = 1; en = 0; accumulate = 0; a = 0; b = 0; m_acc = 0;
    @(posedge clk); @(posedge clk); #1;
    checks++;
    if (acc !== 0) begin failures++; $display("FAIL reset acc=%h", acc); end
    rst = 0;
    // dot product {1,2,3}.{4,5,6}
    step(1, 4, 1, 0); step(2, 5, 1, 1); step(3, 6, 1, 1);
    checks++;
    if (acc !== 32) begin failures++; $display("FAIL dot product %0d", acc); end
    for (int i = 0; i < 1000; i++)
      step($urandom, (i % 3 == 0) ? $urandom : ($urandom & 32'hFF),
           1'($urandom % 4 != 0), 1'($urandom));
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
