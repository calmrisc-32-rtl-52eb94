// tb_calmrisc32: end-to-end test of the CalmRISC-32 core at its default
// parameters.
//
// A program is assembled in the testbench (helper functions below build the
// 16-bit encodings of cr32_pkg) into a program memory model; a data memory
// model and a coprocessor model (cr32_tb_cop) complete the system. The
// program exercises forwarding, the load-use and multiply interlocks, delayed
// and non-delayed branches, brec on a coprocessor condition, call/return,
// the bit read-modify-write operations, coprocessor transfers (cld with post-
// increment and pre-decrement, core<->coprocessor moves), a coprocessor
// exception, a data abort, an instruction abort (retried after the
// handler), a fast interrupt and an interrupt pending together, a
// register-set switch, SYS, the stack and long-immediate sequences and a
// program-memory read (ldp), and a load whose data a store takes in Execute.
// Program and data memories insert wait states in a fixed pseudo-random
// pattern. At the end the testbench requests a break (BKREQ), waits for
// BKMODE and compares registers and memory with values worked out by hand
// from the program. Every mechanism is counted and must occur at least once.
module tb_calmrisc32;
  import cr32_pkg::*;

  logic        clk = 1'b0, nres = 1'b0, nirq = 1'b1, nfrq = 1'b1;
  logic [31:0] PA, DA, DO, DI;
  logic [15:0] PD;
  logic        PBWAIT, IABRT, PBGRANT, DOE, NDMCS, DMWR, DBWAIT, DABRT, DBGRANT;
  logic [1:0]  DSIZE;
  logic [12:0] COPIR;
  logic        NCOPID, STXEN, STMEN, STWEN, STEXP, EXPTAG;
  logic        COPXEN, COPMEN, COPWEN, COPEXP;
  logic [3:0]  EC;
  logic        BKREQ = 1'b0, BKMODE, SYSSTB;
  logic [4:0]  SYSCMD;
  logic        cop_drv_w, cop_drv_r;
  logic [31:0] cop_data, wbus, rbus, dmem_rd;

  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;

  calmrisc32 dut (
    .ICLK(clk), .nRES(nres), .nIRQ(nirq), .nFRQ(nfrq),
    .PA, .PD, .PBWAIT, .IABRT, .PBGRANT,
    .DA, .DO, .DOE, .DI, .NDMCS, .DMWR, .DSIZE, .DBWAIT, .DABRT, .DBGRANT,
    .COPIR, .NCOPID, .STXEN, .STMEN, .STWEN, .STEXP, .EXPTAG,
    .COPXEN, .COPMEN, .COPWEN, .COPEXP, .EC,
    .BKREQ, .BKMODE, .SYSCMD, .SYSSTB
  );

  cr32_tb_cop cop (
    .clk, .rst_n(nres), .COPIR, .NCOPID, .STXEN, .STMEN, .STWEN, .STEXP, .EXPTAG,
    .COPXEN, .COPMEN, .COPWEN, .COPEXP, .EC,
    .db_core(wbus), .core_db(rbus), .drive_db_core(cop_drv_w),
    .drive_core_db(cop_drv_r), .cop_data(cop_data)
  );

  // ------------------------------------------------------------ memories
  logic [15:0] pmem [1024];
  logic [7:0]  dmem [1024];

  localparam logic [31:0] ABORT_ADDR = 32'h3F0;
  localparam logic [31:0] ACK_ADDR   = 32'h7C;
  localparam logic [31:0] FACK_ADDR  = 32'h74;

  assign PD      = pmem[PA[10:1]];
  // instruction abort: the first fetch of label l2 is refused once (like a
  // page fault that the handler repairs); the instruction is then refetched
  logic iabrt_done = 1'b0;
  logic [31:0] iabrt_addr = '1;
  assign IABRT   = !iabrt_done && PA == iabrt_addr;
  assign PBGRANT = 1'b0;
  assign DBGRANT = 1'b0;
  assign PBWAIT  = (cyc % 7) == 3;
  assign DBWAIT  = !NDMCS && ((cyc % 5) == 1);
  assign DABRT   = !NDMCS && DA == ABORT_ADDR;
  assign wbus    = DOE ? DO : (cop_drv_w ? cop_data : 32'd0);
  assign dmem_rd = {dmem[{DA[9:2], 2'd3}], dmem[{DA[9:2], 2'd2}],
                    dmem[{DA[9:2], 2'd1}], dmem[{DA[9:2], 2'd0}]};
  assign rbus    = cop_drv_r ? cop_data : dmem_rd;
  assign DI      = rbus;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (nres && !NDMCS && DMWR && !DBWAIT && !DABRT) begin  // pins are unknown until reset has acted
      unique case (DSIZE)
        2'd0: dmem[DA[9:0]] <= wbus[8*DA[1:0] +: 8];
        2'd1: begin
          dmem[{DA[9:1], 1'b0}] <= wbus[16*DA[1] +: 8];
          dmem[{DA[9:1], 1'b1}] <= wbus[16*DA[1] + 8 +: 8];
        end
        default: for (int k = 0; k < 4; k++) dmem[{DA[9:2], 2'(k)}] <= wbus[8*k +: 8];
      endcase
    end
  end

  // ------------------------------------------------------------ assembler
  int unsigned loc;
  int unsigned labels [string];
  typedef struct { int unsigned at; string lbl; int kind; } fix_t;
  fix_t fixes [$];

  function automatic logic [15:0] alu(int rd, int rs, alu_fn_t f);
    return {OP_ALU, 4'(rd), 4'(rs), f};
  endfunction
  function automatic logic [15:0] shi(int rd, sh_op_t op, int amt);
    return {OP_SHI, 4'(rd), op, 5'(amt)};
  endfunction
  function automatic logic [15:0] addi(int rd, int imm); return {OP_ADDI, 4'(rd), 8'(imm)}; endfunction
  function automatic logic [15:0] movi(int rd, int imm); return {OP_MOVI, 4'(rd), 8'(imm)}; endfunction
  function automatic logic [15:0] misc(int rd, logic [2:0] sub); return {OP_MISC, 4'(rd), 5'd0, sub}; endfunction
  function automatic logic [15:0] mx(logic [2:0] fn, int rd); return {OP_MISC, 4'(rd), 2'b01, fn, 3'd0}; endfunction
  function automatic logic [15:0] srbit(int n, bit v); return {OP_MISC, 3'd0, v, 2'b01, MX_SRBIT, 3'(n)}; endfunction
  function automatic logic [15:0] sys(int cmd); return {OP_MISC, 4'd0, 1'b1, 2'd0, 5'(cmd)}; endfunction
  function automatic logic [15:0] ldw(int rd, int rb, int d); return {OP_LDW, 4'(rd), 4'(rb), 4'(d)}; endfunction
  function automatic logic [15:0] stw(int rd, int rb, int d); return {OP_STW, 4'(rd), 4'(rb), 4'(d)}; endfunction
  function automatic logic [15:0] ldb(int rd, int rb, int d); return {OP_LSHB, 4'(rd), 4'(rb), 2'b01, 2'(d)}; endfunction
  function automatic logic [15:0] bitop(bit_op_t op, int n, int rb, int d);
    return {OP_BIT, op, 3'(n), 4'(rb), 3'(d)};
  endfunction
  function automatic logic [15:0] cld(bit st, int rb, int mode, int cr);
    return {3'b111, 2'b11, st, 4'(rb), 2'(mode), 4'(cr)};
  endfunction
  function automatic logic [15:0] mtc(int rs, int cr); return {3'b111, 3'b100, 4'(rs), 6'(cr)}; endfunction
  function automatic logic [15:0] mfc(int rd, int cr); return {3'b111, 3'b101, 4'(rd), 6'(cr)}; endfunction
  function automatic logic [15:0] cop_op(int fop, int arg); return {3'b111, 2'b00, 3'(fop), 8'(arg)}; endfunction
  function automatic logic [15:0] jmp(int rs, bit d); return {3'b110, BR_JMP, d, 5'd0, 4'(rs)}; endfunction
  function automatic logic [15:0] reti(); return {3'b110, BR_RETI, 10'd0}; endfunction

  task automatic emit(logic [15:0] w);
    pmem[loc >> 1] = w;
    loc += 2;
  endtask
  task automatic label(string s); labels[s] = loc; endtask
  // branch to a label: kind 0 = 9-bit displacement, 1 = brec (7-bit)
  task automatic br(br_type_t t, bit d, string s);
    fixes.push_back('{loc, s, 0});
    emit({3'b110, t, d, 9'd0});
  endtask
  task automatic brec(bit d, int n, string s);
    fixes.push_back('{loc, s, 1});
    emit({3'b110, BR_EC, d, 2'(n), 7'd0});
  endtask
  task automatic resolve();
    foreach (fixes[i]) begin
      int disp;
      disp = (int'(labels[fixes[i].lbl]) - int'(fixes[i].at)) / 2;
      if (fixes[i].kind == 0) pmem[fixes[i].at >> 1][8:0] = 9'(disp);
      else                    pmem[fixes[i].at >> 1][6:0] = 7'(disp);
    end
  endtask

  task automatic build();
    for (int i = 0; i < 1024; i++) pmem[i] = movi(0, 0);
    for (int i = 0; i < 1024; i++) dmem[i] = 8'h00;
    loc = 0;      br(BR_A, 0, "main");
    // data abort handler: count, skip the aborting instruction
    loc = VEC_DABRT;   emit(addi(7, 100)); emit(misc(0, MI_MFSPC)); emit(addi(0, 2));
                  emit(misc(0, MI_MTSPC)); emit(reti());
    // coprocessor exception handler: count, skip the faulting instruction
    loc = VEC_COPX;   emit(addi(7, 10)); emit(misc(0, MI_MFSPC)); emit(addi(0, 2));
                  emit(misc(0, MI_MTSPC)); emit(reti());
    // interrupt handler: count, acknowledge by a store, resume
    // instruction abort handler: count in r15, retry the instruction
    loc = VEC_IABRT; emit(addi(15, 1)); emit(reti());
    // fast interrupt handler: count in r15, acknowledge by a store
    loc = VEC_FIQ;   emit(addi(15, 16)); emit(stw(15, 4, 13)); emit(reti());
    loc = VEC_IRQ;   emit(addi(7, 50)); emit(stw(7, 4, 15)); emit(reti());
    loc = 'h100;  label("main");
    emit(movi(1, 100)); emit(movi(2, -3)); emit(alu(1, 2, ALU_ADD));
    emit(alu(3, 1, ALU_MOV)); emit(shi(3, SH_SL, 4)); emit(movi(4, 'h40));
    emit(stw(3, 4, 0)); emit(ldw(5, 4, 0)); emit(alu(5, 1, ALU_ADD));
    emit(movi(6, 7)); emit(alu(6, 5, ALU_MUL)); emit(alu(6, 1, ALU_ADD));
    emit(alu(6, 5, ALU_CMPGT));
    br(BR_T, 1, "l1"); emit(movi(7, 1)); emit(movi(7, 2));
    label("l1");
    emit(alu(1, 2, ALU_CMPEQ)); br(BR_T, 0, "end"); emit(movi(8, 5));
    br(BR_F, 0, "l2"); emit(movi(8, 99));
    label("l2");
    emit(bitop(BIT_SET, 3, 4, 1)); emit(misc(8, MI_INCT));
    emit(bitop(BIT_TST, 2, 4, 1)); emit(misc(8, MI_INCT));
    emit(ldb(9, 4, 1));
    label("callsite"); br(BR_CALL, 1, "sub"); emit(movi(10, 3));
    emit(movi(11, 'h55)); emit(mtc(11, 1)); emit(cld(0, 4, 1, 2));
    emit(cop_op(0, 'h36));                 // c3 = c1 + c2
    emit(mfc(12, 3)); emit(cld(1, 4, 2, 3)); emit(ldw(13, 4, 0));
    emit(cop_op(1, 4));                    // EC = 4'b0100
    emit(alu(0, 0, ALU_MOV)); emit(alu(0, 0, ALU_MOV)); // EC is set when it completes
    brec(0, 2, "l3"); emit(movi(13, 0));
    label("l3");
    emit(cop_op(2, 0));                    // faults
    emit(movi(0, 'h3F)); emit(shi(0, SH_SL, 4)); emit(ldw(1, 0, 0));
    emit(sys(5));
    emit(movi(0, 'h18)); emit(misc(0, MI_MTSR)); emit(movi(1, 77));
    emit(movi(0, 'h08)); emit(misc(0, MI_MTSR));
    emit(movi(3, -128)); emit(shi(3, SH_SRA, 3));
    emit(movi(0, 3));
    for (int k = 0; k < 3; k++) begin emit(alu(0, 0, ALU_MUL)); emit(alu(0, 0, ALU_ADD)); end
    emit(stw(0, 4, 14));
    // stack (r15 = sp), long immediates, PC read, sr bits
    emit(addi(15, 'h5F));                  // sp = 0x60 if the abort handler ran once
    emit(mx(MX_PUSHQ, 0));                 // save r0..r3
    emit(mx(MX_LDI16, 1)); emit(16'hC123); // halfword looks like a branch
    emit(mx(MX_LDI32, 2)); emit(16'hBEEF); emit(16'hDEAD);
    emit(mx(MX_PUSH, 1)); emit(mx(MX_PUSH, 2));
    emit(mx(MX_POP, 3));
    label("mfpc"); emit(mx(MX_MFPC, 0));
    emit(stw(0, 4, 9)); emit(stw(3, 4, 10));
    emit({OP_SHR, 4'd3, 4'd0, 4'b1000});  // ldp r3, [r0]: the mfpc opcode
    emit(stw(3, 4, 12));
    // load straight into a store, twice (a fetch wait may split one pair)
    repeat (2) begin emit(ldw(1, 4, 12)); emit(stw(1, 4, 8)); end
    emit(srbit(0, 1)); emit(movi(1, 0)); emit(misc(1, MI_INCT));
    emit(srbit(0, 0)); emit(misc(1, MI_INCT)); emit(stw(1, 4, 11));
    emit(addi(15, 4));
    emit(mx(MX_POPQ, 0));                  // restore r0..r3
    emit(movi(0, 'h0E)); emit(misc(0, MI_MTSR));   // ie and fe on
    emit(movi(2, 0)); emit(movi(5, 20));
    label("loop");
    emit(addi(2, 1)); emit(alu(2, 5, ALU_CMPGE)); br(BR_F, 1, "loop"); emit(addi(10, 1));
    label("end");
    br(BR_A, 0, "end");
    label("sub");
    emit(alu(10, 10, ALU_ADD)); emit(jmp(14, 0));
    resolve();
  endtask

  // ------------------------------------------------------------ counters
  int n_fwd_ex, n_fwd_me, n_loaduse, n_mulilk, n_dslot, n_squash, n_bitrmw,
      n_tstall, n_pbwait, n_dbwait, n_copmen, n_copexp, n_dabrt, n_irq, n_reti,
      n_ncopid, n_hi, n_sys, n_brec, n_srstall, n_exptag, n_iabrt, n_fiq, n_useq, n_limm, n_pmem, n_sdfwd;

  always_ff @(posedge clk) if (nres) begin
    if ($test$plusargs("trace"))
      $display("%0d PA=%h PD=%h id=%b/%h ir=%h ex=%b pc=%h me=%b mv=%b%b%b%b%b st=%b exc=%0d r7=%0d r2=%0d r5=%0d t=%b", cyc, PA, PD,
        dut.id_valid, dut.id_pc, dut.ir, dut.ex_c.valid, dut.ex_c.pc, dut.me_c.valid,
        dut.mv_if, dut.mv_id, dut.mv_ex, dut.mv_me, dut.mv_wb, dut.stall_id, dut.cause, dut.u_rf.regs[7], dut.u_rf.regs[2], dut.u_rf.regs[5], dut.sr.t);
    if ($test$plusargs("trace") && !NDMCS && DMWR && !DBWAIT)
      $display("%0d   write DA=%h DO=%h size=%0d", cyc, DA, DO, DSIZE);
    if (dut.mv_id && dut.u_du.dout.c.valid && dut.ex_c.valid && dut.ex_c.we &&
        (dut.ex_c.wd == dut.ra_p || dut.ex_c.wd == dut.rb_p)) n_fwd_ex++;
    if (dut.mv_id && dut.u_du.dout.c.valid && dut.me_c.valid && dut.me_c.we &&
        dut.me_c.mem == M_LD && (dut.me_c.wd == dut.ra_p || dut.me_c.wd == dut.rb_p)) n_fwd_me++;
    if (dut.stall_id && dut.du_hazard && dut.ex_c.mem == M_LD) n_loaduse++;
    if (dut.stall_id && dut.du_hazard && dut.ex_c.unit == U_MUL) n_mulilk++;
    if (dut.mv_if && dut.id_valid && dut.id_is_br && dut.br_delayed && dut.br_taken) n_dslot++;
    if (dut.squash) n_squash++;
    if (!NDMCS && DMWR && dut.me_c.mem == M_BIT) n_bitrmw++;
    if (dut.stall_id && (dut.du_reads_t) && dut.me_c.mem == M_BIT) n_tstall++;
    if (PBWAIT && dut.mv_id) n_pbwait++;
    if (DBWAIT) n_dbwait++;
    if (!COPMEN) n_copmen++;
    if (dut.cause == EXC_COP) n_copexp++;
    if (STEXP) n_dabrt++;
    if (dut.cause == EXC_IRQ) n_irq++;
    if (dut.reti_go) n_reti++;
    if (!NCOPID) n_ncopid++;
    if (dut.pc_hi_en) n_hi++;
    if (SYSSTB) begin
      n_sys++;
      checks++;
      if (SYSCMD != 5'd5) begin failures++; $display("FAIL SYSCMD %0d", SYSCMD); end
    end
    if (dut.id_valid && dut.id_is_br && dut.br_type == BR_EC && dut.br_taken && dut.mv_id) n_brec++;
    if (dut.stall_id && dut.ex_c.valid && dut.ex_c.sr_we) n_srstall++;
    if (EXPTAG) n_exptag++;
    if (dut.cause == EXC_IABRT) n_iabrt++;
    if (dut.cause == EXC_FIQ) n_fiq++;
    if (dut.mv_id && dut.du_busy) n_useq++;
    if (dut.mv_if && dut.du_want_imm && dut.cls == PD_BRANCH) n_limm++;
    if (dut.me_pm && dut.mv_me) n_pmem++;
    if (dut.mv_ex && dut.ex_c.valid && dut.ex_c.sdr && dut.me_c.valid && dut.me_c.we &&
        dut.me_c.mem == M_LD && dut.me_c.wd == dut.ex_c.sreg) n_sdfwd++;
  end

  // interrupt source: raised once the loop is reached, cleared by the ack
  logic irq_done = 1'b0, fiq_done = 1'b0;
  logic [31:0] end_addr = '1, loop_addr = '1;
  always_ff @(posedge clk) begin
    if (nres && !irq_done && PA == loop_addr + 2) nirq <= 1'b0;
    if (!NDMCS && DMWR && DA == ACK_ADDR && !DBWAIT) begin nirq <= 1'b1; irq_done <= 1'b1; end
    if (nres && !fiq_done && PA == loop_addr + 4) nfrq <= 1'b0;
    if (!NDMCS && DMWR && DA == FACK_ADDR && !DBWAIT) begin nfrq <= 1'b1; fiq_done <= 1'b1; end
    if (PA == VEC_IABRT) iabrt_done <= 1'b1;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  task automatic seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  function automatic logic [31:0] dword(int a);
    return {dmem[a+3], dmem[a+2], dmem[a+1], dmem[a]};
  endfunction

  initial begin
    build();
    loop_addr = labels["loop"];
    iabrt_addr = labels["l2"];
    repeat (3) @(posedge clk);
    nres = 1'b1;
    end_addr  = labels["end"];
    do @(posedge clk); while (!(PA == end_addr && irq_done && fiq_done));
    repeat (20) @(posedge clk);
    BKREQ = 1'b1;
    do @(posedge clk); while (!BKMODE);
    @(posedge clk);
    chk("r0",  dut.u_rf.regs[0],  32'h0E);
    chk("r1",  dut.u_rf.regs[1],  32'd97);
    chk("r2",  dut.u_rf.regs[2],  32'd20);
    chk("r3",  dut.u_rf.regs[3],  32'hFFFF_FFF0);
    chk("r4",  dut.u_rf.regs[4],  32'h40);
    chk("r5",  dut.u_rf.regs[5],  32'd20);
    chk("r6",  dut.u_rf.regs[6],  32'd7 * 32'd1649 + 32'd97);
    chk("r7",  dut.u_rf.regs[7],  32'd1 + 32'd10 + 32'd100 + 32'd50);
    chk("r8",  dut.u_rf.regs[8],  32'd6);
    chk("r9",  dut.u_rf.regs[9],  32'h0E);
    chk("r10", dut.u_rf.regs[10], 32'd26);
    chk("r11", dut.u_rf.regs[11], 32'h55);
    chk("r12", dut.u_rf.regs[12], 32'h55 + 32'hE10);
    chk("r13", dut.u_rf.regs[13], 32'h55 + 32'hE10);
    chk("r14", dut.u_rf.regs[14], labels["callsite"] + 32'd4);
    chk("mem[0x78]", dword('h78), 32'd839808);
    chk("set2 r1", dut.u_rf.regs[17], 32'd77);
    chk("mem[0x40]", dword('h40), 32'hE65);
    chk("mem[ack]", dword(ACK_ADDR), 32'd161);
    chk("c1", cop.cr[1], 32'h55);
    chk("c2", cop.cr[2], 32'hE10);
    chk("c3", cop.cr[3], 32'hE65);
    chk("sr", 32'(dut.sr), 32'h0F);
    chk("r15 (sp + fast interrupt count)", dut.u_rf.regs[15], 32'h70);
    chk("mem[fast ack]", dword(FACK_ADDR), 32'h70);
    chk("pushq r0", dword(32'h50), dword(32'h78));
    chk("pushq r3", dword(32'h5C), 32'hFFFF_FFF0);
    chk("push ldi16", dword(32'h4C), 32'hFFFF_C123);
    chk("push ldi32", dword(32'h48), 32'hDEAD_BEEF);
    chk("mfpc", dword(32'h64), labels["mfpc"]);
    chk("pop", dword(32'h68), 32'hDEAD_BEEF);
    chk("ldp", dword(32'h70), 32'(mx(MX_MFPC, 0)));
    chk("load into store", dword(32'h60), 32'(mx(MX_MFPC, 0)));
    chk("sr bit T", dword(32'h6C), 32'd1);
    seen("EX->ID forwarding", n_fwd_ex);
    seen("ME->ID load forwarding", n_fwd_me);
    seen("load-use interlock", n_loaduse);
    seen("multiply interlock", n_mulilk);
    seen("delay slot executed", n_dslot);
    seen("non-delayed squash", n_squash);
    seen("bit read-modify-write", n_bitrmw);
    seen("T interlock on bit op", n_tstall);
    seen("fetch wait (PBWAIT)", n_pbwait);
    seen("data wait (DBWAIT)", n_dbwait);
    seen("COPMEN stall", n_copmen);
    seen("COPEXP exception", n_copexp);
    seen("data abort (STEXP)", n_dabrt);
    seen("interrupt", n_irq);
    seen("reti", n_reti);
    seen("NCOPID issue", n_ncopid);
    seen("upper PC update", n_hi);
    seen("SYS command", n_sys);
    seen("brec taken", n_brec);
    seen("sr-write interlock", n_srstall);
    seen("EXPTAG", n_exptag);
    seen("instruction abort", n_iabrt);
    seen("fast interrupt", n_fiq);
    seen("multi-cycle sequence", n_useq);
    seen("long immediate halfword", n_limm);
    seen("program memory read", n_pmem);
    seen("load data forwarded to a store in Execute", n_sdfwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
