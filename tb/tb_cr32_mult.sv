// tb_cr32_mult: self-checking test of the pipelined 16x16 multiplier. Each
// cycle new operands are presented with adv high; the product must appear
// one rising edge later (two-cycle latency counting the issue cycle), and
// must hold while adv is low.
module tb_cr32_mult;
  logic clk = 0, rst_n = 0, adv = 0;
  logic [15:0] a = 0, b = 0;
  logic [31:0] p, exp_p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cr32_mult dut (.clk, .rst_n, .adv, .a, .b, .p);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (p !== exp_p) begin failures++; $display("FAIL %0d: p=%h expected %h", i, p, exp_p); end
      end
      adv = (i % 4 != 3);
      a = $urandom; b = $urandom;
      if (i % 9 == 0) begin a = 16'hFFFF; b = 16'hFFFF; end
      if (adv) exp_p = 32'(a) * 32'(b);
      @(posedge clk);
      #1;
      checks++;
      if (p !== exp_p) begin failures++; $display("FAIL latency %0d: p=%h expected %h", i, p, exp_p); end
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
