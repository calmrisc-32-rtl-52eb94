// tb_cr32_predecode: exhaustive test of the pre-decoder over all 65536
// instruction words against the class rule of the top three bits.
module tb_cr32_predecode;
  import cr32_pkg::*;
  logic [15:0] ins;
  pdclass_t cls, e;
  int checks = 0, failures = 0;
  int n_cop = 0, n_br = 0;

  cr32_predecode dut (.ins, .cls);

  initial begin
    for (int i = 0; i < 65536; i++) begin
      ins = 16'(i);
      #1;
      e = (i >= 16'hE000) ? PD_COP : (i >= 16'hC000) ? PD_BRANCH : PD_OTHER;
      if (e == PD_COP) n_cop++;
      if (e == PD_BRANCH) n_br++;
      checks++;
      if (cls !== e) begin failures++; $display("FAIL %h: %s expected %s", ins, cls.name(), e.name()); end
    end
    checks++;
    if (n_cop != 8192 || n_br != 8192) failures++;   // 13-bit coprocessor field
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
