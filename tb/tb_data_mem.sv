// tb_data_mem: random word stores and loads compared with an array model;
// checks that the two low address bits are ignored, that a load without
// memread returns 0, and that a store without memwrite changes nothing.
module tb_data_mem;
  logic clk = 0, memwrite, memread;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .addr, .wdata, .memwrite, .memread, .rdata);

  always #5 clk = ~clk;

  initial begin
    memwrite = 0; memread = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      memwrite = 1; addr = 32'(i) << 2; wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); memwrite = 0;
    for (int i = 0; i < 2000; i++) begin
      int w;
      @(negedge clk);
      w = $urandom % 256;
      addr = (32'(w) << 2) | 32'($urandom % 4);
      memread = 1'($urandom % 4 != 0);
      memwrite = 1'($urandom % 3 == 0);
      wdata = $urandom;
      #1 checks++;
      if (rdata !== (memread ? model[w] : 32'h0)) begin
        failures++;
        $display("FAIL addr=%h read=%b rdata=%h expected %h", addr, memread, rdata,
                 memread ? model[w] : 32'h0);
      end
      @(posedge clk);
      if (memwrite) model[w] = wdata;
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
