// cr32_pkg: types and constants shared by the CalmRISC-32 core modules.
//
// The core is a five-stage (Fetch, Decode, Execute, Memory, Writeback) 32-bit
// load/store machine with 16-bit instructions. The instruction classes follow
// the pre-decoding rule that the three most significant bits of an instruction
// tell a coprocessor instruction (13 remaining bits, the "cop imm:13" form), a
// branch, or anything else. The bit-level encoding inside each class, the
// layout of the status register sr and the exception vectors are this design's
// own choices, gathered here so that the decoder, the testbenches and the
// README all use one definition.
//
// Encoding summary (ins[15:0]):
//   15:12 = 0x0  ALU   rd, rs        [11:8] rd [7:4] rs [3:0] alu function
//   15:12 = 0x1  SHIFT rd, rs        [11:8] rd [7:4] rs [3]=0 [2:0] shift function
//                LDP   rd, [rb]      [3:0] = 1000: program-memory halfword
//   15:12 = 0x2  SHIFT rd, #imm5     [11:8] rd [7:5] shift function [4:0] amount
//   15:12 = 0x3  ADDI  rd, #simm8
//   15:12 = 0x4  MOVI  rd, #simm8
//   15:12 = 0x5  MISC  rd            [7:6]=00: [2:0] misc function;
//                                    [7:6]=01: [5:3] push, pop, pushq, popq,
//                                    ldi16, ldi32, mfpc, sr-bit;
//                                    [7]=1: SYS #[4:0]
//   15:12 = 0x6  LDW   rd, [rb+d4*4]
//   15:12 = 0x7  STW   rd, [rb+d4*4]
//   15:12 = 0x8  LDH/LDB/STH/STB rd, [rb+d2*size]   [3:2] variant
//   15:12 = 0x9  LDW   rd, [rb+ri]   (register-register)
//   15:12 = 0xA  LDB/STB r0..r7, [r12+d8]  [11]=store
//   15:12 = 0xB  BITS/BITR/BITC/BITT #n, [rb+d3]
//   15:13 = 110  branches, 15:13 = 111 coprocessor (imm13)
package cr32_pkg;

  // ---------------------------------------------------------------- classes
  typedef enum logic [1:0] {
    PD_OTHER  = 2'd0,
    PD_BRANCH = 2'd1,
    PD_COP    = 2'd2
  } pdclass_t;

  localparam logic [2:0] PD_BRANCH_MSB = 3'b110;
  localparam logic [2:0] PD_COP_MSB    = 3'b111;

  // ------------------------------------------------------------ major codes
  localparam logic [3:0] OP_ALU   = 4'h0;
  localparam logic [3:0] OP_SHR   = 4'h1;
  localparam logic [3:0] OP_SHI   = 4'h2;
  localparam logic [3:0] OP_ADDI  = 4'h3;
  localparam logic [3:0] OP_MOVI  = 4'h4;
  localparam logic [3:0] OP_MISC  = 4'h5;
  localparam logic [3:0] OP_LDW   = 4'h6;
  localparam logic [3:0] OP_STW   = 4'h7;
  localparam logic [3:0] OP_LSHB  = 4'h8;
  localparam logic [3:0] OP_LDWRR = 4'h9;
  localparam logic [3:0] OP_B8    = 4'hA;
  localparam logic [3:0] OP_BIT   = 4'hB;

  // ALU functions (also the [3:0] field of OP_ALU)
  typedef enum logic [3:0] {
    ALU_ADD   = 4'h0, ALU_SUB   = 4'h1, ALU_ADC   = 4'h2, ALU_SBC   = 4'h3,
    ALU_AND   = 4'h4, ALU_OR    = 4'h5, ALU_XOR   = 4'h6, ALU_TST   = 4'h7,
    ALU_MOV   = 4'h8, ALU_CMPEQ = 4'h9, ALU_CMPGE = 4'hA, ALU_CMPGT = 4'hB,
    ALU_CMPUGE= 4'hC, ALU_CMPUGT= 4'hD, ALU_MUL   = 4'hE, ALU_DIVL  = 4'hF
  } alu_fn_t;

  // Internal ALU operations: the encoded functions plus the conditional ones.
  typedef enum logic [4:0] {
    A_ADD, A_SUB, A_ADC, A_SBC, A_AND, A_OR, A_XOR, A_TST, A_MOVB,
    A_CMPEQ, A_CMPGE, A_CMPGT, A_CMPUGE, A_CMPUGT, A_DIVL, A_INCT, A_DECT
  } alu_op_t;

  typedef enum logic [2:0] {
    SH_SL = 3'd0, SH_SR = 3'd1, SH_SRA = 3'd2, SH_RR = 3'd3, SH_RL = 3'd4,
    SH_RRC = 3'd5
  } sh_op_t;

  // MISC sub-functions ([2:0] when [7] = 0)
  localparam logic [2:0] MI_INCT = 3'd0, MI_DECT = 3'd1, MI_MFSR = 3'd2,
                         MI_MTSR = 3'd3, MI_MFSPC = 3'd4, MI_MTSPC = 3'd5,
                         MI_MFSSR = 3'd6, MI_MTSSR = 3'd7;

  // MISC extension ([7:6] = 01, function in [5:3])
  localparam logic [2:0] MX_PUSH = 3'd0, MX_POP = 3'd1, MX_PUSHQ = 3'd2,
                         MX_POPQ = 3'd3, MX_LDI16 = 3'd4, MX_LDI32 = 3'd5,
                         MX_MFPC = 3'd6, MX_SRBIT = 3'd7;

  // Branch types ([12:10] of a branch)
  typedef enum logic [2:0] {
    BR_T = 3'd0, BR_F = 3'd1, BR_A = 3'd2, BR_CALL = 3'd3,
    BR_EC = 3'd4, BR_JMP = 3'd5, BR_JAL = 3'd6, BR_RETI = 3'd7
  } br_type_t;

  // Bit operations on a memory byte
  typedef enum logic [1:0] {
    BIT_SET = 2'd0, BIT_RST = 2'd1, BIT_CPL = 2'd2, BIT_TST = 2'd3
  } bit_op_t;

  // Execute-stage unit that produces the result
  typedef enum logic [1:0] {
    U_ALU = 2'd0, U_SH = 2'd1, U_MUL = 2'd2
  } unit_t;

  // Memory-stage operation
  typedef enum logic [2:0] {
    M_NONE = 3'd0, // no data-side action
    M_LD   = 3'd1, // load to core register
    M_ST   = 3'd2, // store core register
    M_BIT  = 3'd3, // bit read-modify-write
    M_CLD  = 3'd4, // coprocessor load: memory -> coprocessor
    M_CST  = 3'd5, // coprocessor store: coprocessor -> memory
    M_MTC  = 3'd6, // core register -> coprocessor (no memory cycle)
    M_MFC  = 3'd7  // coprocessor -> core register (no memory cycle)
  } mem_op_t;

  // DSIZE encoding on the data memory interface
  typedef enum logic [1:0] {
    SZ_B = 2'd0, SZ_H = 2'd1, SZ_W = 2'd2
  } dsize_t;

  // ------------------------------------------------------- status register
  // sr bit layout (this design's choice): T, IE, FE, PM, RS[1:0]
  typedef struct packed {
    logic [1:0] rs;  // register set selection, used in privileged mode
    logic       pm;  // 1 = privileged mode
    logic       fe;  // fast interrupt (nFRQ) enable
    logic       ie;  // interrupt (nIRQ) enable
    logic       t;   // test bit
  } sr_t;
  localparam int unsigned SR_W = 6;
  localparam sr_t SR_RESET = '{rs: 2'b00, pm: 1'b1, fe: 1'b0, ie: 1'b0, t: 1'b0};

  // --------------------------------------------------------- vectors
  localparam logic [31:0] VEC_RESET = 32'h0000_0000;
  // 16 bytes (eight instructions) apart
  localparam logic [31:0] VEC_IABRT = 32'h0000_0010;
  localparam logic [31:0] VEC_DABRT = 32'h0000_0020;
  localparam logic [31:0] VEC_COPX  = 32'h0000_0030;
  localparam logic [31:0] VEC_FIQ   = 32'h0000_0040;
  localparam logic [31:0] VEC_IRQ   = 32'h0000_0050;

  typedef enum logic [2:0] {
    EXC_NONE, EXC_IABRT, EXC_DABRT, EXC_COP, EXC_FIQ, EXC_IRQ
  } exc_t;

  // ------------------------------------------------- pipeline control word
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    unit_t       unit;
    alu_op_t     alu_op;
    sh_op_t      sh_op;
    logic        t_we;     // execute result updates T
    logic        we;       // writes a general-purpose register
    logic [4:0]  wd;       // physical destination register
    mem_op_t     mem;
    dsize_t      size;
    logic        addr_sum; // address = a + b (1) or a (0)
    bit_op_t     bitop;
    logic [2:0]  bitno;
    logic        sr_we;    // a -> sr
    logic        spc_we;   // a -> special PC register
    logic        ssr_we;   // a -> special sr register
    logic        sys;      // SYS command
    logic [4:0]  syscmd;
    logic        cop;      // coprocessor instruction
    logic        pmem;     // program-memory read (ldp) in the Memory stage
    logic        sdr;      // store data is read in Execute ...
    logic [4:0]  sreg;     // ... from this physical register
  } ctl_t;

  // Decode -> Execute: control plus operands
  typedef struct packed {
    ctl_t        c;
    logic [31:0] a;
    logic [31:0] b;
  } idex_t;

  // Execute -> Memory
  typedef struct packed {
    ctl_t        c;
    logic [31:0] res;      // execute result (ALU/shifter; multiplier in ME)
    logic [31:0] addr;     // data address
    logic [31:0] sd;       // store data
  } exme_t;

  function automatic ctl_t ctl_nop();
    ctl_t c;
    c = '0;
    c.unit   = U_ALU;
    c.alu_op = A_MOVB;
    c.sh_op  = SH_SL;
    c.mem    = M_NONE;
    c.size   = SZ_W;
    c.bitop  = BIT_SET;
    return c;
  endfunction

  // Logical-to-physical register mapping onto four sets of eight. User mode
  // sees sets 0 (r0..r7) and 1 (r8..r15). Privileged mode picks set 0 or 2
  // for r0..r7 with rs[0], and set 1 or 3 for r8..r15 with rs[1].
  function automatic logic [4:0] phys_reg(input logic [3:0] lr, input sr_t s);
    logic [1:0] set;
    if (!s.pm) set = {1'b0, lr[3]};                      // user: sets 0 and 1
    else       set = lr[3] ? {s.rs[1], 1'b1} : {s.rs[0], 1'b0};
    return {set, lr[2:0]};
  endfunction

endpackage
