// tb_alu: drives every ALU operation with corner and random operands and
// compares result, zero and carry with values computed in 64-bit integer
// arithmetic.
module tb_alu;
  import dsp_pkg::*;
  word_t a, b, y;
  alu_op_e op;
  logic zero, carry;
  logic clk = 0;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .y, .zero, .carry);

  always #5 clk = ~clk;

  task automatic try(input alu_op_e o, input word_t va, input word_t vb);
    longint sa, sb, q;
    logic [63:0] r;
    word_t ey;
    logic ec;
    sa = longint'($signed(va));
    sb = longint'($signed(vb));
    ec = 1'b0;
    case (o)
      ALU_ADD: begin r = {32'h0, va} + {32'h0, vb}; ey = r[31:0]; ec = r[32]; end
      ALU_SUB: begin ey = word_t'(sa - sb); ec = (va < vb); end
      ALU_PASS_A: ey = va;
      ALU_PASS_B: ey = vb;
      ALU_DIV: begin
        if (vb == 0) ey = 32'hFFFF_FFFF;
        else begin q = sa / sb; ey = q[31:0]; end   // -2^31/-1 wraps to -2^31
      end
      default: ey = '0;
    endcase
    a = va; b = vb; op = o;
    #1 checks++;
    if (y !== ey || zero !== (ey == 0) || carry !== ec) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h: y=%h z=%b c=%b expected y=%h z=%b c=%b",
               o.name(), va, vb, y, zero, carry, ey, (ey == 0), ec);
    end
  endtask

  initial begin
    word_t corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h5};
    alu_op_e ops [7] = '{ALU_ADD, ALU_SUB, ALU_PASS_A, ALU_PASS_B, ALU_DIV, ALU_MUL, ALU_MACC};
    foreach (ops[k])
      foreach (corners[i])
        foreach (corners[j])
          try(ops[k], corners[i], corners[j]);
    for (int n = 0; n < 3000; n++) begin
      word_t va, vb;
      va = $urandom; vb = $urandom;
      if (n % 4 == 0) vb = vb >> 20;         // small divisors
      if (n % 7 == 0) vb = va;                // equal operands: zero
      try(ops[n % 7], va, vb);
    end
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
