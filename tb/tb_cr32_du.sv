// tb_cr32_du: self-checking test of the Decoder Unit. A register file model
// returns 0x1000 + register number; instructions of every class are loaded
// into the instruction register and the decoded control word and operands
// are compared with what the encoding (cr32_pkg) calls for. Forwarding
// priority (Execute over Memory over Writeback), the interlock for a value
// produced in Memory, link generation for calls and the privilege check are
// covered, and the multi-cycle instructions: the push/pop operation
// sequences and the halfwords of the long-immediate loads, and ldp.
module tb_cr32_du;
  import cr32_pkg::*;
  logic clk = 0, rst_n = 0, ir_load = 0;
  logic [15:0] ins = 0, ir;
  logic id_valid = 1, id_is_br = 0, br_link = 0, br_regtgt = 0;
  logic [31:0] id_pc = 32'h200, spc = 32'h5550, ssr = 32'h3, link_val = 0;
  sr_t sr;
  logic [3:0] br_rs = 0, ra, rb, rd;
  logic [4:0] ra_p, rb_p, rd_p, wb_wa = 0;
  logic [31:0] qa, qb, ex_res = 0, me_val = 0, wb_val = 0, br_reg;
  ctl_t ex_c, me_c;
  logic wb_we = 0, hazard, reads_t, reads_sr, cop_ir;
  logic adv = 0, flush = 0, busy, want_imm, no_exc;
  idex_t dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign ra_p = {1'b0, ra};
  assign rb_p = {1'b0, rb};
  assign rd_p = {1'b0, rd};
  assign qa = 32'h1000 + 32'(ra_p);
  assign qb = 32'h1000 + 32'(rb_p);

  cr32_du dut (.*);

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h expected %h", w, g, e); end
  endtask
  task automatic put(logic [15:0] w);
    @(negedge clk); ins = w; ir_load = 1;
    @(posedge clk); #1 ir_load = 0;
  endtask

  initial begin
    ex_c = ctl_nop(); me_c = ctl_nop(); sr = SR_RESET;
    repeat (2) @(posedge clk);
    rst_n = 1;
    put({OP_ALU, 4'd3, 4'd5, ALU_ADD});
    chk("add a", dout.a, 32'h1003);
    chk("add b", dout.b, 32'h1005);
    chk("add op", 32'(dout.c.alu_op), 32'(A_ADD));
    chk("add we/wd", {dout.c.we, dout.c.wd}, {1'b1, 5'd3});
    chk("add pc", dout.c.pc, 32'h200);
    chk("no hazard", 32'(hazard), 0);
    put({OP_ALU, 4'd3, 4'd5, ALU_CMPGT});
    chk("cmp no write", {dout.c.we, dout.c.t_we}, 2'b01);
    put({OP_LDW, 4'd2, 4'd7, 4'd3});
    chk("ldw base", dout.a, 32'h1007);
    chk("ldw disp", dout.b, 32'd12);
    chk("ldw mem", {29'(dout.c.mem), dout.c.addr_sum, dout.c.we}, {29'(M_LD), 1'b1, 1'b1});
    chk("ldw wd", 32'(dout.c.wd), 2);
    put({OP_STW, 4'd4, 4'd6, 4'd1});
    chk("stw base/disp", {dout.a, dout.b}, {32'h1006, 32'd4});
    chk("stw data", {26'd0, dout.c.sdr, dout.c.sreg}, {26'd0, 1'b1, 5'h04});
    chk("stw no write", 32'(dout.c.we), 0);
    ex_c.valid = 1; ex_c.we = 1; ex_c.wd = 4; ex_c.mem = M_LD;
    #1 chk("store data from a load: no wait", 32'(hazard), 0);
    ex_c = ctl_nop();
    put({OP_LSHB, 4'd4, 4'd6, 2'b01, 2'd3});
    chk("ldb size/disp", {30'(dout.c.size), dout.b[1:0]}, {30'(SZ_B), 2'd3});
    put({OP_SHR, 4'd6, 4'd7, 4'b1000});
    chk("ldp pointer", dout.a, 32'h1007);
    chk("ldp control", {dout.c.pmem, dout.c.addr_sum, dout.c.we, dout.c.wd},
        {1'b1, 1'b0, 1'b1, 5'd6});
    ex_c.valid = 1; ex_c.we = 1; ex_c.wd = 7; ex_c.pmem = 1;
    #1 chk("ldp result is late", 32'(hazard), 1);
    ex_c = ctl_nop();
    put({OP_ALU, 4'd3, 4'd5, ALU_MUL});
    chk("mul unit", 32'(dout.c.unit), 32'(U_MUL));
    // forwarding priority on port B (r5)
    put({OP_ALU, 4'd3, 4'd5, ALU_ADD});
    ex_c.valid = 1; ex_c.we = 1; ex_c.wd = 5; ex_res = 32'hAAAA;
    me_c.valid = 1; me_c.we = 1; me_c.wd = 5; me_val = 32'hBBBB;
    wb_we = 1; wb_wa = 5; wb_val = 32'hCCCC;
    #1 chk("forward from execute", dout.b, 32'hAAAA);
    ex_c.valid = 0;
    #1 chk("forward from memory", dout.b, 32'hBBBB);
    me_c.we = 0;
    #1 chk("forward from writeback", dout.b, 32'hCCCC);
    wb_we = 0;
    #1 chk("register file", dout.b, 32'h1005);
    // interlock: load in Execute writes r5
    ex_c.valid = 1; ex_c.mem = M_LD; ex_c.we = 1; ex_c.wd = 5;
    #1 chk("load-use hazard", 32'(hazard), 1);
    put({OP_MOVI, 4'd5, 8'h80});
    chk("movi no hazard", 32'(hazard), 0);
    chk("movi value", dout.b, 32'hFFFF_FF80);
    ex_c = ctl_nop();
    // coprocessor: cld pre-decrement, cld post-increment, mfc, mtc
    put({3'b111, 2'b11, 1'b0, 4'd9, 2'b10, 4'd2});
    chk("cld -[rb]", {dout.a, dout.b}, {32'h1009, -32'sd4});
    chk("cld -[rb] ctl", {29'(dout.c.mem), dout.c.addr_sum, dout.c.we}, {29'(M_CLD), 1'b1, 1'b1});
    chk("cop flag", {31'd0, dout.c.cop}, 1);
    chk("cop ir", {31'd0, cop_ir}, 1);
    put({3'b111, 2'b11, 1'b1, 4'd9, 2'b01, 4'd2});
    chk("cst [rb]+", {29'(dout.c.mem), dout.c.addr_sum, dout.c.we}, {29'(M_CST), 1'b0, 1'b1});
    chk("cst [rb]+ inc", dout.b, 4);
    put({3'b111, 3'b101, 4'd6, 6'd1});
    chk("mfc", {29'(dout.c.mem), dout.c.we, 2'b00}, {29'(M_MFC), 1'b1, 2'b00});
    chk("mfc wd", 32'(dout.c.wd), 6);
    put({3'b111, 3'b100, 4'd6, 6'd1});
    chk("mtc data", {26'd0, dout.c.sdr, dout.c.sreg}, {26'd0, 1'b1, 5'h06});
    // privileged moves
    put({OP_MISC, 4'd2, 5'd0, MI_MTSR});
    chk("mtsr privileged", {31'd0, dout.c.sr_we}, 1);
    chk("mtsr value", dout.b, 32'h1002);
    sr.pm = 0;
    #1 chk("mtsr in user mode", {31'd0, dout.c.sr_we}, 0);
    sr.pm = 1;
    put({OP_MISC, 4'd2, 5'd0, MI_MFSPC});
    chk("mfspc", dout.b, 32'h5550);
    chk("reads sr", {31'd0, reads_sr}, 1);
    put({OP_MISC, 4'd2, 5'd0, MI_INCT});
    chk("inct reads T", {31'd0, reads_t}, 1);
    put({OP_BIT, BIT_CPL, 3'd6, 4'd3, 3'd2});
    chk("bit op", {29'(dout.c.mem), dout.c.bitno}, {29'(M_BIT), 3'd6});
    chk("bit addr", {dout.a, dout.b}, {32'h1003, 32'd2});
    // stack and multi-cycle instructions (r15 = sp)
    put({OP_MISC, 4'd6, 2'b01, MX_PUSH, 3'd0});
    chk("push", {dout.a, dout.b, 27'd0, dout.c.sreg}, {32'h100F, -32'sd4, 32'd6});
    chk("push ctl", {29'(dout.c.mem), dout.c.addr_sum, dout.c.we, 27'(dout.c.wd)},
        {29'(M_ST), 1'b1, 1'b1, 27'd15});
    chk("push not busy", {31'd0, busy}, 0);
    put({OP_MISC, 4'd4, 2'b01, MX_POPQ, 3'd0});
    for (int k = 0; k < 5; k++) begin
      chk("popq busy", {31'd0, busy}, {31'd0, k != 4});
      chk("popq no interrupt", {31'd0, no_exc}, {31'd0, k != 0});
      if (k < 4) begin
        chk("popq load", {29'(dout.c.mem), 27'(dout.c.wd)}, {29'(M_LD), 27'(4 + k)});
        chk("popq offset", dout.b, 32'(4 * k));
      end else
        chk("popq sp", {dout.b, 32'(dout.c.wd)}, {32'd16, 32'd15});
      @(negedge clk); adv = 1; @(posedge clk); #1 adv = 0;
    end
    put({OP_MISC, 4'd0, 2'b01, MX_PUSHQ, 3'd0});
    chk("pushq first register", {26'd0, dout.c.sdr, dout.c.sreg}, {26'd0, 1'b1, 5'h03});
    @(negedge clk); adv = 1; @(posedge clk); #1 adv = 0;
    chk("pushq second register", {26'd0, dout.c.sdr, dout.c.sreg}, {26'd0, 1'b1, 5'h02});
    chk("pushq second offset", dout.b, 32'hFFFF_FFF8);
    chk("pushq stores leave sp", {31'd0, dout.c.we}, 0);
    @(negedge clk); flush = 1; @(posedge clk); #1 flush = 0;
    chk("flush ends the sequence", {26'd0, dout.c.sdr, dout.c.sreg}, {26'd0, 1'b1, 5'h03});
    repeat (4) begin @(negedge clk); adv = 1; @(posedge clk); #1 adv = 0; end
    chk("pushq last: sp -= 16", {dout.c.we, dout.c.wd, dout.b},
        {1'b1, 5'd15, 32'hFFFF_FFF0});
    chk("pushq last: no store", 32'(dout.c.mem), 32'(M_NONE));
    chk("pushq last: done", {31'd0, busy}, 0);
    put({OP_MISC, 4'd9, 2'b01, MX_LDI32, 3'd0});
    chk("ldi opcode: bubble", {31'd0, dout.c.valid}, 0);
    chk("ldi wants immediate", {31'd0, want_imm}, 1);
    put(16'hBEEF);
    chk("first halfword: bubble", {31'd0, dout.c.valid}, 0);
    chk("first halfword: no interrupt", {31'd0, no_exc}, 1);
    chk("wants second halfword", {31'd0, want_imm}, 1);
    put(16'hDEAD);
    chk("ldi32 value", dout.b, 32'hDEAD_BEEF);
    chk("ldi32 dest", {dout.c.valid, dout.c.we, dout.c.wd}, {1'b1, 1'b1, 5'd9});
    chk("no cop on data", {31'd0, cop_ir}, 0);
    // the opcode issues while fetch waits: the next halfword is still data
    put({OP_MISC, 4'd2, 2'b01, MX_LDI32, 3'd0});
    @(negedge clk); adv = 1; @(posedge clk); #1 adv = 0; id_valid = 0;
    #1 chk("ldi issued, fetch waiting: wants data", {31'd0, want_imm}, 1);
    chk("ldi issued: no interrupt", {31'd0, no_exc}, 1);
    @(negedge clk); flush = 1; #1 chk("flush: not data", {31'd0, want_imm}, 0);
    @(posedge clk); #1 flush = 0;
    chk("after flush: not data", {31'd0, want_imm}, 0);
    put({OP_MISC, 4'd2, 2'b01, MX_LDI16, 3'd0}); // the IR turns valid on a load
    id_valid = 1;
    put(16'hC123);
    chk("ldi16 value", dout.b, 32'hFFFF_C123);
    chk("ldi16 last", {31'd0, want_imm}, 0);
    put({OP_MISC, 4'd3, 2'b01, MX_MFPC, 3'd0});
    chk("mfpc", dout.b, id_pc);
    put({OP_MISC, 3'd0, 1'b1, 2'b01, MX_SRBIT, 3'd1});
    chk("set sr.ie", dout.b, 32'(SR_RESET) | 32'h2);
    chk("sr bit waits for sr", {31'd0, reads_sr}, 1);
    // call: link into r14
    id_is_br = 1; br_link = 1; link_val = 32'h0000_0204;
    #1 chk("link value", dout.b, 32'h204);
    chk("link reg", {dout.c.we, dout.c.wd}, {1'b1, 5'd14});
    br_link = 0; br_regtgt = 1; br_rs = 4'd11;
    #1 chk("jump register", br_reg, 32'h100B);
    chk("branch leaves bubble", {31'd0, dout.c.valid}, 0);
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
