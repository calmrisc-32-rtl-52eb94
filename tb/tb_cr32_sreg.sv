// tb_cr32_sreg: self-checking test of sr and the special registers: T from
// Execute and from Memory (Execute wins at the same edge), moves into sr, spc
// and ssr, exception entry (saves PC and sr, enters privileged mode with
// interrupts off, keeps the T of an older instruction completing at the same
// edge) and return (sr restored from ssr).
module tb_cr32_sreg;
  import cr32_pkg::*;
  logic clk = 0, rst_n = 0;
  logic exc = 0, reti = 0, ex_commit = 0, ex_t_we = 0, ex_t = 0, ex_sr_we = 0;
  logic ex_spc_we = 0, ex_ssr_we = 0, me_t_we = 0, me_commit = 0, me_t = 0;
  logic [31:0] exc_pc = 0, ex_val = 0, spc, ssr;
  sr_t sr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cr32_sreg dut (.*);

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h expected %h", w, g, e); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (2) @(posedge clk);
    chk("reset sr", 32'(sr), 32'(SR_RESET));
    rst_n = 1;
    @(negedge clk); ex_commit = 1; ex_t_we = 1; ex_t = 1; tick();
    chk("T from execute", 32'(sr.t), 1);
    ex_t = 0; me_commit = 1; me_t_we = 1; me_t = 1; tick();
    chk("execute wins over memory", 32'(sr.t), 0);
    ex_commit = 0; tick();
    chk("T from memory", 32'(sr.t), 1);
    me_commit = 0; me_t_we = 0;
    ex_commit = 1; ex_t_we = 0; ex_sr_we = 1; ex_val = 32'h1E; tick();   // rs=01 pm=1 fe=1 ie=1 t=0
    chk("move to sr", 32'(sr), 32'h1E);
    ex_sr_we = 0; ex_spc_we = 1; ex_val = 32'h1234; tick();
    chk("move to spc", spc, 32'h1234);
    ex_spc_we = 0; ex_ssr_we = 1; ex_val = 32'h2A; tick();
    chk("move to ssr", ssr, 32'h2A);
    ex_ssr_we = 0;
    // exception with an older instruction setting T at the same edge
    ex_t_we = 1; ex_t = 1; exc = 1; exc_pc = 32'h0000_0456; tick();
    exc = 0; ex_commit = 0; ex_t_we = 0;
    chk("spc saved", spc, 32'h456);
    chk("ssr saved", ssr, 32'h1F);
    chk("sr on entry", 32'(sr), 32'h19);   // pm=1, ie=fe=0, T kept
    reti = 1; tick(); reti = 0;
    chk("sr restored", 32'(sr), 32'h1F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
