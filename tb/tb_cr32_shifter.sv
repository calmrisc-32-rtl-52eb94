// tb_cr32_shifter: self-checking test of the barrel shifter. Random words and
// amounts for every operation, compared with shifts and rotations written
// here with the language's own operators.
module tb_cr32_shifter;
  import cr32_pkg::*;
  sh_op_t op;
  logic [31:0] a, y, ey;
  logic [4:0] amt;
  logic t_in, t_out, et;
  int checks = 0, failures = 0;

  cr32_shifter dut (.op, .a, .amt, .t_in, .y, .t_out);

  initial begin
    logic [63:0] d;
    for (int i = 0; i < 6000; i++) begin
      a = $urandom; amt = $urandom; t_in = $urandom; op = sh_op_t'(i % 6);
      if (i % 11 == 0) amt = 0;
      #1;
      d = {a, a};
      et = t_in;
      unique case (op)
        SH_SL:  ey = a << amt;
        SH_SR:  ey = a >> amt;
        SH_SRA: ey = $signed(a) >>> amt;
        SH_RR:  ey = 32'(d >> amt);
        SH_RL:  ey = d[63 - amt -: 32];
        default: begin ey = {t_in, a[31:1]}; et = a[0]; end
      endcase
      checks++;
      if (y !== ey || t_out !== et) begin
        failures++;
        $display("FAIL %s a=%h amt=%0d: y=%h t=%b expected %h %b", op.name(), a, amt, y, t_out, ey, et);
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
