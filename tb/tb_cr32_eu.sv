// tb_cr32_eu: self-checking test of the Execution Unit. Random ALU, shift,
// multiply and address-calculation instructions are loaded one per cycle;
// results, T and addresses are compared with values computed here, the
// multiplier product is checked one stage later, and the input registers of
// the shifter and the multiplier are checked to stay still while other units
// are used (operand isolation). Store data is read in Execute: a register
// file model answers port S, and random Memory and Writeback results check
// the forwarding priority (Memory first).
module tb_cr32_eu;
  import cr32_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, flush = 0, adv = 0, t_in = 0;
  idex_t din;
  ctl_t c;
  logic [31:0] res, addr, sd, mul_p, qs, me_val = 0, wb_val = 0, exp_sd;
  logic [4:0]  sreg, wb_wa = 0;
  logic        wb_we = 0;
  ctl_t        me_c;

  assign qs = 32'h5000_0000 + 32'(sreg);
  logic t_out, t_we;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cr32_eu dut (.clk, .rst_n, .load, .flush, .din, .adv, .t_in, .c, .res,
               .t_out, .t_we, .addr, .sreg, .qs, .me_c, .me_val, .wb_we,
               .wb_wa, .wb_val, .sd, .mul_p);

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h expected %h", w, g, e); end
  endtask

  initial begin
    logic [31:0] sh_before, exp_mul;
    logic [15:0] mul_before;
    logic was_mul;
    din = '0; din.c = ctl_nop(); me_c = ctl_nop();
    repeat (2) @(posedge clk);
    rst_n = 1;
    was_mul = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      din.c = ctl_nop(); din.c.valid = 1;
      din.a = $urandom; din.b = $urandom;
      unique case (i % 4)
        0: begin din.c.unit = U_ALU; din.c.alu_op = (i % 8 == 0) ? A_ADD : A_XOR; din.c.t_we = 0; end
        1: begin din.c.unit = U_SH; din.c.sh_op = SH_SRA; din.b = 32'($urandom_range(0, 31)); end
        2: begin din.c.unit = U_MUL; end
        default: begin
          din.c.unit = U_ALU; din.c.alu_op = A_ADD; din.c.mem = M_LD;
          din.c.addr_sum = (i % 8 == 3); din.b = 32'($urandom_range(0, 60));
          din.c.mem = M_ST; din.c.sdr = 1'b1; din.c.sreg = 5'($urandom);
        end
      endcase
      sh_before  = dut.sh_a;
      mul_before = dut.mul_a;
      load = 1; adv = 1;
      @(posedge clk); #1;
      load = 0;
      if (was_mul) chk("product", mul_p, exp_mul);
      was_mul = 0;
      unique case (i % 4)
        0: chk("alu", res, (din.c.alu_op == A_ADD) ? din.a + din.b : din.a ^ din.b);
        1: chk("shift", res, $signed(din.a) >>> din.b[4:0]);
        2: begin exp_mul = din.a[15:0] * din.b[15:0]; was_mul = 1; end
        default: begin
          chk("addr", addr, din.c.addr_sum ? din.a + din.b : din.a);
          me_c = ctl_nop(); me_c.valid = $urandom_range(0, 1) == 1; me_c.we = 1'b1;
          me_c.wd = ($urandom_range(0, 2) == 0) ? din.c.sreg : 5'($urandom);
          me_val = $urandom;
          wb_we = $urandom_range(0, 1) == 1; wb_val = $urandom;
          wb_wa = ($urandom_range(0, 1) == 0) ? din.c.sreg : 5'($urandom);
          #1;
          if (me_c.valid && me_c.wd == din.c.sreg) exp_sd = me_val;
          else if (wb_we && wb_wa == din.c.sreg)   exp_sd = wb_val;
          else                                     exp_sd = 32'h5000_0000 + 32'(din.c.sreg);
          chk("store data", sd, exp_sd);
          chk("store register", 32'(sreg), 32'(din.c.sreg));
        end
      endcase
      if (din.c.unit != U_SH)  chk("shifter inputs still", dut.sh_a, sh_before);
      if (din.c.unit != U_MUL) chk("multiplier inputs still", 32'(dut.mul_a), 32'(mul_before));
    end
    // T output and flush
    @(negedge clk);
    din.c = ctl_nop(); din.c.valid = 1; din.c.alu_op = A_CMPEQ; din.c.t_we = 1;
    din.a = 5; din.b = 5; load = 1;
    @(posedge clk); #1 load = 0;
    chk("cmp T", {31'd0, t_out}, 1);
    chk("t_we", {31'd0, t_we}, 1);
    flush = 1;
    @(posedge clk); #1 flush = 0;
    chk("flushed", {31'd0, c.valid}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
