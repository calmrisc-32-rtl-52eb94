// cr32_du: Decoder Unit, the Decode stage of the CalmRISC-32 pipeline.
//
// Holds the instruction register (branches are latched in the program
// address generation unit instead), decodes the instruction into the control
// word that travels down the pipeline, reads its operands from the register
// file and replaces them with newer values found in the later stages
// (forwarding): the Execute result, the Memory-stage result and the value
// being written back, in that order of priority. A value that only appears in
// the Memory stage (a load, a coprocessor-to-core transfer or a multiply,
// whose second half runs in Memory, a program-memory read) cannot be
// forwarded from Execute; the decoder then raises `hazard` and the pipeline
// controller holds Decode for a cycle (interlock). A store's data is not
// read here: the control word names its physical register (`sreg`) and the
// Execute stage reads it, as the document places it. Branches that link (call) are turned here into a move of
// the return address into r14; the other branches leave a bubble.
//
// Multi-cycle instructions are issued here as a short sequence of ordinary
// operations while the instruction stays in the IR (`busy` holds fetching;
// `step` counts, advancing with `adv`): push is one store with pre-decrement
// of r15 (the stack pointer by convention); pop is a load and then r15 += 4;
// pushq stores the four registers of a group (r4g+3 down to r4g) at r15-4
// .. r15-16, one per cycle, and then subtracts 16 from r15 (r15 moves last,
// so a data abort restarts it cleanly); popq loads them from [r15], [r15+4],
// ... and then adds 16 to r15 (popq of the group holding r15 is not
// meaningful). The long-immediate loads ldi16/ldi32 are followed in program
// memory by one or two halfwords of data: `want_imm` tells the fetch logic
// that the next halfword is data (so it is never taken for a branch), also
// when the opcode has already issued and the fetch is waiting; a flush
// cancels it. The opcode
// issues a bubble and the last halfword issues the move into rd (low half
// first for ldi32). No interrupt is taken inside such a sequence (`no_exc`).
// Having these instructions, and their sequences, is from the document; the
// encodings, the stack direction and the operation order are this design's.
//
// The instruction encoding is documented in cr32_pkg. Privileged operations
// (moves to and from sr and the special registers, SYS) decode as no-ops in
// user mode. Decode is combinational except for the instruction register,
// which loads at the rising edge when `ir_load` is high.
module cr32_du
  import cr32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ir_load,
  input  logic [15:0] ins,
  // what the Decode stage holds
  input  logic        id_valid,
  input  logic        id_is_br,
  input  logic [31:0] id_pc,
  input  sr_t         sr,
  input  logic [31:0] spc,
  input  logic [31:0] ssr,
  // branch side (from the address generation unit)
  input  logic        br_link,
  input  logic [31:0] link_val,
  input  logic [3:0]  br_rs,
  input  logic        br_regtgt,  // branch target comes from a register
  // register file
  output logic [3:0]  ra,
  output logic [3:0]  rb,
  output logic [3:0]  rd,
  input  logic [4:0]  ra_p,
  input  logic [4:0]  rb_p,
  input  logic [4:0]  rd_p,
  input  logic [31:0] qa,
  input  logic [31:0] qb,
  // forwarding sources
  input  ctl_t        ex_c,
  input  logic [31:0] ex_res,
  input  ctl_t        me_c,
  input  logic [31:0] me_val,
  input  logic        wb_we,
  input  logic [4:0]  wb_wa,
  input  logic [31:0] wb_val,
  // results
  output idex_t       dout,
  output logic [15:0] ir,
  output logic [31:0] br_reg,   // forwarded operand for register branches
  output logic        hazard,   // operand not yet available
  output logic        reads_t,  // instruction reads T in Execute
  output logic        reads_sr, // instruction reads sr or a special register
  output logic        cop_ir,   // the instruction register holds a coprocessor op
  // multi-cycle instructions
  input  logic        adv,      // Decode hands its operation to Execute
  input  logic        flush,    // Decode is flushed
  output logic        busy,     // more operations of this instruction follow
  output logic        want_imm, // the next fetched halfword is immediate data
  output logic        no_exc    // no interrupt may be taken here
);

  logic [3:0] f_rd, f_rs;
  logic       use_a, use_b;
  logic [31:0] fa, fb;
  ctl_t        c;
  logic [31:0] a, b;
  logic        b_imm;       // b is an immediate, not port B
  logic        sd_from_b;   // store data is port B
  logic        late_ex;
  logic [2:0]  step;        // operation number within a multi-cycle instruction
  logic [2:0]  last;        // number of the last operation
  logic        imm_now;     // the IR holds an immediate halfword
  logic        imm_last;    // ... and it is the last one
  logic        imm_pend;    // an ldi part has issued; its next halfword is still to come
  logic        imm_more;    // the IR holds an ldi opcode or low half, valid
  logic        imm_long;    // 32-bit immediate
  logic [3:0]  ldi_rd;
  logic [15:0] imm_lo;
  logic        is_ldi;
  logic [3:0]  qreg;        // register of a pushq/popq step

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ir <= '0;
    else if (ir_load) ir <= ins;
  end

  assign f_rd   = ir[11:8];
  assign f_rs   = ir[7:4];
  assign cop_ir = (ir[15:13] == PD_COP_MSB) && !imm_now;
  assign is_ldi = !imm_now && ir[15:12] == OP_MISC && ir[7:6] == 2'b01 &&
                  (ir[5:3] == MX_LDI16 || ir[5:3] == MX_LDI32);

  // multi-cycle sequencing: `step` counts the operations issued for the
  // instruction in the IR (push/pop family); long immediates collect the
  // halfwords that follow the opcode, one per fetch
  always_comb begin
    last = 3'd0;
    if (!imm_now && !id_is_br && ir[15:12] == OP_MISC && ir[7:6] == 2'b01)
      unique case (ir[5:3])
        MX_POP:   last = 3'd1;
        MX_PUSHQ: last = 3'd4;
        MX_POPQ:  last = 3'd4;
        default:  last = 3'd0;
      endcase
    busy     = id_valid && (step != last);
    imm_more = id_valid && !id_is_br && (is_ldi || (imm_now && !imm_last));
    // the next halfword is data while the opcode (or low half) is in the IR,
    // and also once it has issued but fetch has not delivered the next one
    want_imm = !flush && (imm_more || imm_pend);
    no_exc   = (step != 3'd0) || imm_now || imm_pend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step     <= '0;
      imm_now  <= 1'b0;
      imm_last <= 1'b0;
      imm_long <= 1'b0;
      ldi_rd   <= '0;
      imm_lo   <= '0;
      imm_pend <= 1'b0;
    end else begin
      if (ir_load || flush)         step <= '0;
      else if (adv && busy)         step <= step + 3'd1;
      if (flush) begin
        imm_now  <= 1'b0;
        imm_pend <= 1'b0;
      end else if (ir_load) begin
        imm_pend <= 1'b0;
        if (want_imm && !imm_now) begin          // opcode -> first halfword
          imm_now  <= 1'b1;
          imm_last <= (ir[5:3] == MX_LDI16);
          imm_long <= (ir[5:3] == MX_LDI32);
          ldi_rd   <= f_rd;
        end else if (want_imm) begin             // low half -> high half
          imm_last <= 1'b1;
          imm_lo   <= ir;
        end else begin
          imm_now  <= 1'b0;
        end
      end else if (adv && imm_more) begin
        imm_pend <= 1'b1;
      end
    end
  end

  function automatic logic [31:0] fwd(input logic [4:0] p, input logic [31:0] q,
                                      input ctl_t exc, input logic [31:0] exr,
                                      input ctl_t mec, input logic [31:0] mev,
                                      input logic wbe, input logic [4:0] wba,
                                      input logic [31:0] wbv);
    if (exc.valid && exc.we && exc.wd == p)      return exr;
    else if (mec.valid && mec.we && mec.wd == p) return mev;
    else if (wbe && wba == p)                    return wbv;
    else                                         return q;
  endfunction

  // ---------------------------------------------------------------- decode
  always_comb begin
    c         = ctl_nop();
    c.pc      = id_pc;
    ra        = f_rd;
    rb        = f_rs;
    rd        = f_rd;
    use_a     = 1'b0;
    use_b     = 1'b0;
    b_imm     = 1'b0;
    b         = '0;
    sd_from_b = 1'b0;
    reads_t   = 1'b0;
    reads_sr  = 1'b0;
    qreg      = {f_rd[3:2], 2'b00};
    if (imm_now) begin
      // immediate halfword of ldi: the last one carries the whole value
      c.valid = id_valid && imm_last;
      c.we    = 1'b1;
      rd      = ldi_rd;
      b_imm   = 1'b1;
      b       = imm_long ? {ir, imm_lo} : {{16{ir[15]}}, ir};
    end else if (id_is_br) begin
      rb    = br_rs;
      rd    = 4'd14;
      use_b = br_regtgt;              // register target is read on port B
      if (br_link) begin
        c.valid = id_valid;
        c.we    = 1'b1;
        b_imm   = 1'b1;
        b       = link_val;
      end
    end else begin
      c.valid = id_valid;
      unique case (ir[15:12])
        OP_ALU: begin
          use_a = 1'b1; use_b = 1'b1; c.we = 1'b1;
          unique case (alu_fn_t'(ir[3:0]))
            ALU_ADD:    c.alu_op = A_ADD;
            ALU_SUB:    c.alu_op = A_SUB;
            ALU_ADC:    begin c.alu_op = A_ADC; c.t_we = 1'b1; reads_t = 1'b1; end
            ALU_SBC:    begin c.alu_op = A_SBC; c.t_we = 1'b1; reads_t = 1'b1; end
            ALU_AND:    c.alu_op = A_AND;
            ALU_OR:     c.alu_op = A_OR;
            ALU_XOR:    c.alu_op = A_XOR;
            ALU_TST:    begin c.alu_op = A_TST;    c.t_we = 1'b1; c.we = 1'b0; end
            ALU_MOV:    begin c.alu_op = A_MOVB;   use_a = 1'b0; end
            ALU_CMPEQ:  begin c.alu_op = A_CMPEQ;  c.t_we = 1'b1; c.we = 1'b0; end
            ALU_CMPGE:  begin c.alu_op = A_CMPGE;  c.t_we = 1'b1; c.we = 1'b0; end
            ALU_CMPGT:  begin c.alu_op = A_CMPGT;  c.t_we = 1'b1; c.we = 1'b0; end
            ALU_CMPUGE: begin c.alu_op = A_CMPUGE; c.t_we = 1'b1; c.we = 1'b0; end
            ALU_CMPUGT: begin c.alu_op = A_CMPUGT; c.t_we = 1'b1; c.we = 1'b0; end
            ALU_MUL:    c.unit = U_MUL;
            ALU_DIVL:   begin c.alu_op = A_DIVL; c.t_we = 1'b1; end
            default: ;
          endcase
        end
        OP_SHR, OP_SHI: begin
          use_a = 1'b1; c.we = 1'b1; c.unit = U_SH;
          if (ir[15:12] == OP_SHR && ir[3]) begin
            // ldp rd, [rb]: zero-extended halfword from program memory
            ra = f_rs; c.unit = U_ALU; c.pmem = 1'b1; c.addr_sum = 1'b0;
          end else if (ir[15:12] == OP_SHR) begin
            use_b = 1'b1; c.sh_op = sh_op_t'(ir[2:0]);
          end else begin
            b_imm = 1'b1; b = {27'd0, ir[4:0]}; c.sh_op = sh_op_t'(ir[7:5]);
          end
          if (c.sh_op == SH_RRC) begin c.t_we = 1'b1; reads_t = 1'b1; end
        end
        OP_ADDI: begin
          use_a = 1'b1; c.we = 1'b1; c.alu_op = A_ADD;
          b_imm = 1'b1; b = {{24{ir[7]}}, ir[7:0]};
        end
        OP_MOVI: begin
          c.we = 1'b1; c.alu_op = A_MOVB;
          b_imm = 1'b1; b = {{24{ir[7]}}, ir[7:0]};
        end
        OP_MISC: begin
          b_imm = 1'b1;
          reads_sr = !ir[7] && !ir[6] && (ir[2:0] inside {MI_MFSR, MI_MFSPC, MI_MFSSR});
          if (ir[7]) begin
            c.sys = sr.pm; c.syscmd = ir[4:0];
          end else if (ir[6]) begin
            // stack, long immediates, PC and sr-bit instructions (r15 = sp)
            unique case (ir[5:3])
              MX_PUSH: begin                     // [--sp] <- rd
                ra = 4'd15; rd = 4'd15; rb = f_rd; use_a = 1'b1; use_b = 1'b1;
                sd_from_b = 1'b1; b = -32'sd4; c.addr_sum = 1'b1;
                c.mem = M_ST; c.we = 1'b1; c.alu_op = A_ADD;
              end
              MX_POP: begin                      // rd <- [sp]; sp += 4
                ra = 4'd15; use_a = 1'b1;
                if (step == 3'd0) begin c.mem = M_LD; c.we = 1'b1; end
                else begin rd = 4'd15; c.we = 1'b1; c.alu_op = A_ADD; b = 32'd4; end
              end
              MX_PUSHQ: begin                    // push r(4g+3) .. r(4g)
                // stores at sp-4 .. sp-16, then sp -= 16: sp only moves once
                // every store is done, so a data abort can restart pushq
                ra = 4'd15; rd = 4'd15; use_a = 1'b1; c.alu_op = A_ADD;
                if (step != 3'd4) begin
                  rb = qreg | (4'd3 - {1'b0, step[1:0]});
                  use_b = 1'b1; sd_from_b = 1'b1; c.addr_sum = 1'b1; c.mem = M_ST;
                  b = ~{28'd0, step[1:0], 2'b00} - 32'd3;
                end else begin
                  c.we = 1'b1; b = -32'sd16;
                end
              end
              MX_POPQ: begin                     // r(4g) .. r(4g+3) <- [sp+4k]; sp += 16
                ra = 4'd15; use_a = 1'b1; c.we = 1'b1; c.alu_op = A_ADD;
                if (step != 3'd4) begin
                  rd = qreg | {2'b00, step[1:0]}; c.mem = M_LD; c.addr_sum = 1'b1;
                  b = {28'd0, step[1:0], 2'b00};
                end else begin
                  rd = 4'd15; c.alu_op = A_ADD; b = 32'd16;
                end
              end
              MX_LDI16, MX_LDI32: c.valid = 1'b0; // value follows in the next halfword(s)
              MX_MFPC: begin c.we = 1'b1; b = id_pc; end
              default: begin                     // sr bit [2:0] <- [8]
                reads_sr = 1'b1;
                b = {{(32-SR_W){1'b0}}, sr};
                b[{2'b00, ir[2:0]}] = ir[8];
                c.sr_we = sr.pm || ir[2:0] == 3'd0;   // T is free to user mode
              end
            endcase
          end else begin
            unique case (ir[2:0])
              MI_INCT: begin use_a = 1'b1; c.we = 1'b1; c.alu_op = A_INCT; reads_t = 1'b1; end
              MI_DECT: begin use_a = 1'b1; c.we = 1'b1; c.alu_op = A_DECT; reads_t = 1'b1; end
              MI_MFSR: begin c.we = 1'b1; b = {{(32-SR_W){1'b0}}, sr}; end
              MI_MFSPC: begin c.we = sr.pm; b = spc; end
              MI_MFSSR: begin c.we = sr.pm; b = ssr; end
              default: begin // moves into sr / spc / ssr: value via port B
                rb = f_rd; use_b = 1'b1; b_imm = 1'b0;
                c.sr_we  = sr.pm && ir[2:0] == MI_MTSR;
                c.spc_we = sr.pm && ir[2:0] == MI_MTSPC;
                c.ssr_we = sr.pm && ir[2:0] == MI_MTSSR;
              end
            endcase
          end
        end
        OP_LDW, OP_STW, OP_LSHB: begin
          ra = f_rs; rb = f_rd; use_a = 1'b1;
          c.alu_op = A_ADD; c.addr_sum = 1'b1; b_imm = 1'b1;
          if (ir[15:12] == OP_LSHB) begin
            c.size = ir[2] ? SZ_B : SZ_H;
            b      = ir[2] ? {30'd0, ir[1:0]} : {29'd0, ir[1:0], 1'b0};
            c.mem  = ir[3] ? M_ST : M_LD;
          end else begin
            c.size = SZ_W;
            b      = {26'd0, ir[3:0], 2'b00};
            c.mem  = (ir[15:12] == OP_STW) ? M_ST : M_LD;
          end
          if (c.mem == M_ST) begin use_b = 1'b1; sd_from_b = 1'b1; end
          else c.we = 1'b1;
        end
        OP_LDWRR: begin
          ra = f_rs; rb = ir[3:0]; use_a = 1'b1; use_b = 1'b1;
          c.alu_op = A_ADD; c.addr_sum = 1'b1; c.mem = M_LD; c.size = SZ_W; c.we = 1'b1;
        end
        OP_B8: begin
          ra = 4'd12; rb = {1'b0, ir[10:8]}; rd = {1'b0, ir[10:8]}; use_a = 1'b1;
          c.alu_op = A_ADD; c.addr_sum = 1'b1; c.size = SZ_B;
          b_imm = 1'b1; b = {24'd0, ir[7:0]};
          if (ir[11]) begin c.mem = M_ST; use_b = 1'b1; sd_from_b = 1'b1; end
          else begin c.mem = M_LD; c.we = 1'b1; end
        end
        OP_BIT: begin
          ra = ir[6:3]; use_a = 1'b1;
          c.alu_op = A_ADD; c.addr_sum = 1'b1; c.size = SZ_B; c.mem = M_BIT;
          c.bitop = bit_op_t'(ir[11:10]); c.bitno = ir[9:7];
          b_imm = 1'b1; b = {29'd0, ir[2:0]};
        end
        default: begin // coprocessor class: cop imm:13
          c.cop = 1'b1;
          if (ir[12:11] == 2'b11) begin          // cld: memory <-> coprocessor
            ra = ir[9:6]; rd = ir[9:6]; use_a = 1'b1; b_imm = 1'b1;
            c.mem  = ir[10] ? M_CST : M_CLD;
            c.size = SZ_W;
            unique case (ir[5:4])
              2'b00: begin c.addr_sum = 1'b0; b = 32'd0; end           // [rb]
              2'b01: begin c.addr_sum = 1'b0; b = 32'd4; c.we = 1'b1; end  // [rb]+
              2'b10: begin c.addr_sum = 1'b1; b = -32'd4; c.we = 1'b1; end // -[rb]
              default: begin c.addr_sum = 1'b0; b = -32'd4; c.we = 1'b1; end // [rb]-
            endcase
            c.alu_op = A_ADD;
          end else if (ir[12:11] == 2'b10) begin // register transfer
            rb = ir[9:6]; rd = ir[9:6];
            if (ir[10]) begin c.mem = M_MFC; c.we = 1'b1; end
            else begin c.mem = M_MTC; use_b = 1'b1; sd_from_b = 1'b1; end
          end
        end
      endcase
    end
    c.wd = rd_p;
    // store data is only named here; Execute reads it
    c.sdr  = sd_from_b;
    c.sreg = rb_p;
  end

  // -------------------------------------------------------- operand fetch
  always_comb begin
    fa = fwd(ra_p, qa, ex_c, ex_res, me_c, me_val, wb_we, wb_wa, wb_val);
    fb = fwd(rb_p, qb, ex_c, ex_res, me_c, me_val, wb_we, wb_wa, wb_val);
    a  = fa;
    late_ex = ex_c.valid && ex_c.we &&
              (ex_c.mem == M_LD || ex_c.mem == M_MFC || ex_c.unit == U_MUL ||
               ex_c.pmem);
    hazard = id_valid && late_ex &&
             ((use_a && ex_c.wd == ra_p) || (use_b && !sd_from_b && ex_c.wd == rb_p));
    br_reg = fb;
    dout.c  = c;
    dout.a  = a;
    dout.b  = b_imm ? b : fb;
  end

endmodule
