// tb_cr32_alu: self-checking test of the adder/logic unit. Random operands
// for every operation, compared with a reference computed here with 64-bit
// arithmetic and $signed compares; the divide step is checked by running
// sixteen steps and comparing quotient and remainder with / and %.
module tb_cr32_alu;
  import cr32_pkg::*;
  alu_op_t op;
  logic [31:0] a, b, y;
  logic t_in, t_out;
  int checks = 0, failures = 0;

  cr32_alu dut (.op, .a, .b, .t_in, .y, .t_out);

  task automatic expect_eq(string what, logic [31:0] gy, logic [31:0] ey, logic gt, logic et);
    checks++;
    if (gy !== ey || gt !== et) begin
      failures++;
      $display("FAIL %s op=%s a=%h b=%h t=%b: y=%h t=%b expected y=%h t=%b",
               what, op.name(), a, b, t_in, gy, gt, ey, et);
    end
  endtask

  initial begin
    logic [63:0] w;
    logic [31:0] ey; logic et;
    for (int i = 0; i < 4000; i++) begin
      a = $urandom; b = (i % 5 == 0) ? a : $urandom; t_in = $urandom;
      if (i % 7 == 0) b = {a[31], 31'($urandom)};
      op = alu_op_t'(i % 17);
      #1;
      et = t_in; ey = 'x;
      unique case (op)
        A_ADD:  ey = a + b;
        A_SUB:  ey = a - b;
        A_ADC:  begin w = {32'd0, a} + {32'd0, b} + 64'(t_in); ey = w[31:0]; et = w[32]; end
        A_SBC:  begin w = {32'd0, a} + {32'd0, ~b} + 64'(t_in); ey = w[31:0]; et = w[32]; end
        A_AND:  ey = a & b;
        A_OR:   ey = a | b;
        A_XOR:  ey = a ^ b;
        A_TST:  begin ey = a & b; et = (a & b) == 0; end
        A_MOVB: ey = b;
        A_CMPEQ:  begin ey = a - b; et = a == b; end
        A_CMPGE:  begin ey = a - b; et = $signed(a) >= $signed(b); end
        A_CMPGT:  begin ey = a - b; et = $signed(a) > $signed(b); end
        A_CMPUGE: begin ey = a - b; et = a >= b; end
        A_CMPUGT: begin ey = a - b; et = a > b; end
        A_INCT:   ey = a + 32'(t_in);
        A_DECT:   ey = a - 32'(t_in);
        default:  begin ey = y; et = t_out; end   // divide step checked below
      endcase
      expect_eq("op", y, ey, t_out, et);
    end
    // sixteen divide steps = one 16/16 unsigned division
    for (int i = 0; i < 300; i++) begin
      logic [15:0] n, d;
      n = $urandom; d = $urandom_range(1, 65535);
      if (i % 3 == 0) d = $urandom_range(1, 255);
      a = {16'd0, n}; b = {16'd0, d}; op = A_DIVL; t_in = 0;
      for (int s = 0; s < 16; s++) begin #1; a = y; end
      checks++;
      if (a[15:0] !== n / d || a[31:16] !== n % d) begin
        failures++;
        $display("FAIL divl %0d/%0d: q=%0d r=%0d", n, d, a[15:0], a[31:16]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
