// tb_instr_mem: loads random bytes through the byte-wide load port and checks
// that a fetch at byte address A returns bytes A..A+3, most significant byte
// first, including the wrap at the end of the 256-byte space.
module tb_instr_mem;
  logic clk = 0, we;
  logic [7:0]  waddr, wdata;
  logic [31:0] addr, instr;
  logic [7:0]  model [256];
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .we, .waddr, .wdata, .addr, .instr);

  always #5 clk = ~clk;

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      model[i] = 8'($urandom);
      we = 1; waddr = 8'(i); wdata = model[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 256; i++) begin
      logic [31:0] exp;
      addr = 32'(i) | ($urandom & 32'hFFFF_FF00);  // upper bits are ignored
      exp = {model[i], model[(i+1)%256], model[(i+2)%256], model[(i+3)%256]};
      #1 checks++;
      if (instr !== exp) begin
        failures++;
        $display("FAIL addr=%h instr=%h expected %h", addr, instr, exp);
      end
    end
    // a rewrite of one byte changes only that byte of the fetched word
    @(negedge clk); we = 1; waddr = 8'h11; wdata = ~model[8'h11]; model[8'h11] = ~model[8'h11];
    @(posedge clk); #1 we = 0; addr = 32'h10;
    #1 checks++;
    if (instr !== {model[8'h10], model[8'h11], model[8'h12], model[8'h13]}) begin
      failures++; $display("FAIL rewrite: %h", instr);
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
