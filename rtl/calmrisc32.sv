// calmrisc32: the CalmRISC-32 core, a 32-bit low-power MCU core.
//
// A Harvard-architecture, five-stage pipeline (Fetch, Decode, Execute,
// Memory, Writeback) running 16-bit load/store instructions on 32-bit data,
// with a passive-coprocessor interface. Blocks and their stages:
//   Fetch/Decode  cr32_predecode  sorts each fetched instruction by its top
//                                 three bits into branch / coprocessor / other
//                 cr32_pagu       PC, branch latch, branch resolution in
//                                 Decode, one delay slot, low-power PC
//   Decode        cr32_du         instruction register, decode, register
//                                 read and forwarding, interlock detection
//                 cr32_regfile    32 registers in four sets of eight
//   Execute       cr32_eu         adder/logic unit, barrel shifter and 16x16
//                                 multiplier behind separate input registers
//   Memory        cr32_mu         data memory cycle, bit read-modify-write,
//                                 coprocessor data transfers
//   Writeback     (here)          register file write
//   all           cr32_pcu        stage advance, interlocks, exceptions,
//                                 coprocessor pipeline synchronisation
//                 cr32_sreg       sr and the saved PC/sr of an exception
//
// Interfaces (names from the document where it gives them):
//   program memory: PA (byte address of the fetched halfword), PD, PBWAIT,
//     IABRT; a DMA grant PBGRANT holds fetch like PBWAIT.
//   data memory: DA, DO/DOE, DI, NDMCS (low = access), DMWR, DSIZE (0 byte,
//     1 half, 2 word), DBWAIT, DABRT; DBGRANT holds a data access like DBWAIT.
//   coprocessor: COPIR[12:0] with NCOPID (low in the cycle the coprocessor
//     instruction moves from Decode to Execute), STXEN/STMEN/STWEN and
//     COPXEN/COPMEN/COPWEN for lock-step advance, EXPTAG (a memory
//     instruction, which may abort, is in Execute), STEXP (data abort taken),
//     COPEXP (coprocessor exception), EC[3:0] (conditions for brec).
//   others: nRES (asynchronous reset, low), nIRQ, nFRQ (interrupts, low),
//     BKREQ/BKMODE (break request: fetching stops, BKMODE once the pipeline
//     is empty), SYSCMD/SYSSTB (the 5-bit command of a SYS instruction).
// Multi-cycle instructions (push/pop/pushq/popq, long-immediate loads) are
// sequenced by the decoder; while it is busy, fetching holds, and the
// halfwords that follow a long-immediate opcode bypass the branch latch.
// ldp borrows the program bus from the Memory stage for one cycle: PA then
// carries its pointer, fetch holds, and PD (zero-extended) is its result.
// Memories answer within the cycle in which the address is out (or raise a
// wait); the document's latch-based two-phase clocking and gated clocks are
// replaced by one rising-edge clock ICLK with enables.
module calmrisc32
  import cr32_pkg::*;
#(
  parameter int unsigned PC_SPLIT = 8
) (
  input  logic        ICLK,
  input  logic        nRES,
  input  logic        nIRQ,
  input  logic        nFRQ,
  // program memory
  output logic [31:0] PA,
  input  logic [15:0] PD,
  input  logic        PBWAIT,
  input  logic        IABRT,
  input  logic        PBGRANT,
  // data memory
  output logic [31:0] DA,
  output logic [31:0] DO,
  output logic        DOE,
  input  logic [31:0] DI,
  output logic        NDMCS,
  output logic        DMWR,
  output logic [1:0]  DSIZE,
  input  logic        DBWAIT,
  input  logic        DABRT,
  input  logic        DBGRANT,
  // coprocessor
  output logic [12:0] COPIR,
  output logic        NCOPID,
  output logic        STXEN,
  output logic        STMEN,
  output logic        STWEN,
  output logic        STEXP,
  output logic        EXPTAG,
  input  logic        COPXEN,
  input  logic        COPMEN,
  input  logic        COPWEN,
  input  logic        COPEXP,
  input  logic [3:0]  EC,
  // debug and system
  input  logic        BKREQ,
  output logic        BKMODE,
  output logic [4:0]  SYSCMD,
  output logic        SYSSTB
);

  logic clk, rst_n;
  assign clk   = ICLK;
  assign rst_n = nRES;

  // ------------------------------------------------------------ signals
  pdclass_t    cls;
  logic        mv_if, mv_id, mv_ex, mv_me, mv_wb, stall_id;
  logic        flush_id, flush_ex, flush_me, exc, reti_go;
  exc_t        cause;
  logic        id_valid, id_is_br, id_slot, id_iabrt;
  logic [31:0] id_pc, link_val, br_reg, exc_pc, vec;
  br_type_t    br_type;
  logic [3:0]  br_rs;
  logic        br_taken, br_delayed, br_link, squash, t_fwd, pc_hi_en;
  sr_t         sr;
  logic [31:0] spc, ssr;
  logic [3:0]  ra, rb, rd;
  logic [4:0]  ra_p, rb_p, rd_p;
  logic [31:0] qa, qb;
  idex_t       du_out, ex_in;
  logic [15:0] ir;
  logic        du_hazard, du_reads_t, du_reads_sr, cop_ir;
  logic        du_busy, du_want_imm, du_noexc, is_br_word;
  ctl_t        ex_c, me_c;
  logic [31:0] ex_res, ex_addr, ex_sd, mul_p, qs;
  logic [4:0]  ex_sreg;
  logic        ex_t, ex_t_we;
  exme_t       me_in;
  logic        me_rdy, me_access, me_t_we, me_t;
  logic [31:0] me_val, me_val_mu, pc_f;
  logic        me_pm, me_rdy_eff;
  logic        wb_valid, wb_we;
  logic [4:0]  wb_wa;
  logic [31:0] wb_val;
  logic        pbwait_eff, dbwait_eff;

  assign pbwait_eff = PBWAIT || PBGRANT;
  assign dbwait_eff = DBWAIT || DBGRANT;

  // -------------------------------------------------------------- fetch
  cr32_predecode u_pd (.ins(PD), .cls(cls));
  // the halfwords after a long-immediate opcode are data, never branches
  assign is_br_word = (cls == PD_BRANCH) && !du_want_imm;

  always_comb begin
    t_fwd  = ex_t_we ? ex_t : sr.t;          // T forwarded from Execute
    squash = id_valid && id_is_br && mv_id && br_taken && !br_delayed;
  end

  cr32_pagu #(.PC_SPLIT(PC_SPLIT)) u_pagu (
    .clk, .rst_n,
    .fetch_adv(mv_if), .br_load(is_br_word), .ins(PD),
    .id_adv(mv_id), .br_valid(id_valid && id_is_br), .t(t_fwd), .ec(EC),
    .reg_val(br_reg), .spc(spc), .redirect(exc), .redirect_pc(vec),
    .pc(pc_f), .id_pc(id_pc), .br_type(br_type), .br_rs(br_rs),
    .taken(br_taken), .delayed(br_delayed), .link(br_link),
    .link_val(link_val), .hi_en(pc_hi_en)
  );

  // Decode-stage status
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_valid <= 1'b0;
      id_is_br <= 1'b0;
      id_slot  <= 1'b0;
      id_iabrt <= 1'b0;
    end else if (flush_id) begin
      id_valid <= 1'b0;
    end else if (mv_if) begin
      id_valid <= !squash;
      id_is_br <= is_br_word;
      id_slot  <= id_valid && id_is_br && br_delayed;
      id_iabrt <= IABRT;
    end else if (mv_id && !du_busy) begin
      id_valid <= 1'b0;
    end
  end

  // ------------------------------------------------------------- decode
  cr32_regfile u_rf (
    .clk, .rst_n, .sr(sr), .ra(ra), .rb(rb), .rd(rd),
    .ra_p(ra_p), .rb_p(rb_p), .rd_p(rd_p), .qa(qa), .qb(qb), .rs_p(ex_sreg), .qs(qs),
    .we(wb_valid && wb_we && mv_wb), .wa(wb_wa), .wdata(wb_val)
  );

  cr32_du u_du (
    .clk, .rst_n, .ir_load(mv_if && !is_br_word), .ins(PD),
    .id_valid(id_valid), .id_is_br(id_is_br), .id_pc(id_pc),
    .sr(sr), .spc(spc), .ssr(ssr),
    .br_link(br_link), .link_val(link_val), .br_rs(br_rs),
    .br_regtgt(br_type == BR_JMP || br_type == BR_JAL),
    .ra(ra), .rb(rb), .rd(rd), .ra_p(ra_p), .rb_p(rb_p), .rd_p(rd_p),
    .qa(qa), .qb(qb),
    .ex_c(ex_c), .ex_res(ex_res), .me_c(me_c), .me_val(me_val),
    .wb_we(wb_valid && wb_we), .wb_wa(wb_wa), .wb_val(wb_val),
    .dout(du_out), .ir(ir), .br_reg(br_reg), .hazard(du_hazard),
    .reads_t(du_reads_t), .reads_sr(du_reads_sr), .cop_ir(cop_ir),
    .adv(mv_id), .flush(flush_id), .busy(du_busy), .want_imm(du_want_imm),
    .no_exc(du_noexc)
  );

  assign COPIR  = ir[12:0];
  assign NCOPID = !(mv_id && id_valid && !id_is_br && cop_ir);

  // ------------------------------------------------------------ execute
  always_comb begin
    ex_in = du_out;
    if (!mv_id) ex_in.c.valid = 1'b0;        // bubble
  end

  cr32_eu u_eu (
    .clk, .rst_n, .load(mv_ex), .flush(flush_ex), .din(ex_in), .adv(mv_ex),
    .t_in(sr.t), .c(ex_c), .res(ex_res), .t_out(ex_t), .t_we(ex_t_we),
    .addr(ex_addr), .sreg(ex_sreg), .qs(qs), .me_c(me_c), .me_val(me_val),
    .wb_we(wb_valid && wb_we), .wb_wa(wb_wa), .wb_val(wb_val), .sd(ex_sd), .mul_p(mul_p)
  );

  assign EXPTAG = ex_c.valid && (ex_c.mem inside {M_LD, M_ST, M_BIT, M_CLD, M_CST});

  // ldp: the instruction in Memory borrows the program bus for a cycle; the
  // fetch holds meanwhile (it sees a wait) and PBWAIT holds the ldp
  assign me_pm      = me_c.valid && me_c.pmem;
  assign PA         = me_pm ? {DA[31:1], 1'b0} : pc_f;
  assign me_val     = me_pm ? {16'd0, PD} : me_val_mu;
  assign me_rdy_eff = me_rdy && !(me_pm && pbwait_eff);

  // ------------------------------------------------------------- memory
  always_comb begin
    me_in.c    = ex_c;
    me_in.res  = ex_res;
    me_in.addr = ex_addr;
    me_in.sd   = ex_sd;
    if (!mv_ex || flush_ex) me_in.c.valid = 1'b0;
  end

  cr32_mu u_mu (
    .clk, .rst_n, .load(mv_me), .flush(flush_me), .din(me_in),
    .mul_p(mul_p),
    .DA(DA), .DO(DO), .DOE(DOE), .DI(DI), .NDMCS(NDMCS), .DMWR(DMWR),
    .DSIZE(DSIZE), .DBWAIT(dbwait_eff),
    .c(me_c), .rdy(me_rdy), .access(me_access), .val(me_val_mu),
    .t_we(me_t_we), .t_out(me_t)
  );

  // ---------------------------------------------------------- writeback
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_we    <= 1'b0;
      wb_wa    <= '0;
      wb_val   <= '0;
    end else if (mv_wb) begin
      wb_valid <= mv_me && me_c.valid && !flush_me;
      wb_we    <= me_c.we;
      wb_wa    <= me_c.wd;
      wb_val   <= me_val;
    end
  end

  // ---------------------------------------------------- control, status
  cr32_pcu u_pcu (
    .id_valid(id_valid), .id_is_br(id_is_br),
    .id_is_reti(id_is_br && br_type == BR_RETI), .id_slot(id_slot),
    .id_iabrt(id_iabrt), .id_busy(du_busy), .id_noexc(du_noexc), .du_hazard(du_hazard), .du_reads_t(du_reads_t),
    .du_reads_sr(du_reads_sr),
    .br_reads_t(id_is_br && (br_type == BR_T || br_type == BR_F)),
    .br_taken_delayed(id_is_br && br_taken && br_delayed),
    .ex_valid(ex_c.valid), .ex_cop(ex_c.cop), .ex_sr_we(ex_c.sr_we),
    .ex_bitop(ex_c.valid && ex_c.mem == M_BIT),
    .me_valid(me_c.valid), .me_bitop(me_c.valid && me_c.mem == M_BIT),
    .me_rdy(me_rdy_eff), .me_access(me_access), .wb_valid(wb_valid), .sr(sr),
    .PBWAIT(pbwait_eff || me_pm), .DABRT(DABRT), .COPXEN(COPXEN), .COPMEN(COPMEN),
    .COPWEN(COPWEN), .COPEXP(COPEXP), .nIRQ(nIRQ), .nFRQ(nFRQ), .BKREQ(BKREQ),
    .mv_if(mv_if), .mv_id(mv_id), .mv_ex(mv_ex), .mv_me(mv_me), .mv_wb(mv_wb),
    .stall_id(stall_id), .flush_id(flush_id), .flush_ex(flush_ex),
    .flush_me(flush_me), .exc(exc), .cause(cause), .reti_go(reti_go),
    .STXEN(STXEN), .STMEN(STMEN), .STWEN(STWEN), .STEXP(STEXP), .BKMODE(BKMODE)
  );

  always_comb begin
    unique case (cause)
      EXC_DABRT: begin exc_pc = me_c.pc; vec = VEC_DABRT; end
      EXC_COP:   begin exc_pc = ex_c.pc; vec = VEC_COPX;  end
      EXC_IABRT: begin exc_pc = id_pc;   vec = VEC_IABRT; end
      EXC_FIQ:   begin exc_pc = id_pc;   vec = VEC_FIQ;   end
      default:   begin exc_pc = id_pc;   vec = VEC_IRQ;   end
    endcase
  end

  cr32_sreg u_sreg (
    .clk, .rst_n, .exc(exc), .exc_pc(exc_pc), .reti(reti_go),
    .ex_commit(mv_ex && ex_c.valid && !flush_ex),
    .ex_t_we(ex_c.t_we), .ex_t(ex_t), .ex_sr_we(ex_c.sr_we),
    .ex_spc_we(ex_c.spc_we), .ex_ssr_we(ex_c.ssr_we), .ex_val(ex_res),
    .me_t_we(me_t_we), .me_commit(mv_me && me_c.valid && !flush_me), .me_t(me_t),
    .sr(sr), .spc(spc), .ssr(ssr)
  );

  assign SYSSTB = mv_ex && ex_c.valid && !flush_ex && ex_c.sys;
  assign SYSCMD = ex_c.syscmd;

endmodule
