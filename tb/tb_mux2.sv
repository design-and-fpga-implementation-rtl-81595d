// tb_mux2: checks that sel=0 passes d0 and sel=1 passes d1 for random data.
module tb_mux2;
  logic [31:0] d0, d1, y;
  logic sel;
  logic clk = 0;
  int checks = 0, failures = 0;

  mux2 dut (.d0, .d1, .sel, .y);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 400; i++) begin
      d0 = $urandom; d1 = $urandom; sel = 1'(i & 1);
      #1 checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
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
