// cr32_eu: Execution Unit, the Execute stage of the CalmRISC-32 pipeline.
//
// It holds the instruction that is in Execute and computes its result with
// one of three datapath blocks: the adder/logic unit (cr32_alu), the barrel
// shifter (cr32_shifter) and the first half of the 16x16 multiplier
// (cr32_mult). As in the document, each large block is fed by its own input
// registers, which load only when an instruction for that block enters the
// stage, so the other blocks' inputs stay still and do not toggle. Memory
// instructions use the adder for the address (base + displacement or index);
// `addr_sum` selects the sum or the bare base (post-increment forms).
// As the document describes, a store's data operand is read in this stage:
// `sreg` addresses a register-file read port and the result of the
// instruction in Memory (first) or in Writeback is forwarded over it.
//
// Timing: `load` (decode hands over an instruction) and `flush` act at the
// rising edge; `adv` (the Execute stage hands over to Memory) clocks the
// multiplier's first stage, so `mul_p` is the product of the instruction that
// is now in the Memory stage. Outputs res/t_out/addr are combinational from
// the stage registers. The result goes on to Memory and is also forwarded to
// the decoder by the caller.
module cr32_eu
  import cr32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        flush,
  input  idex_t       din,
  input  logic        adv,
  input  logic        t_in,     // current T for adc/sbc/inct/dect/rrc
  output ctl_t        c,        // control word of the instruction in Execute
  output logic [31:0] res,
  output logic        t_out,
  output logic        t_we,     // valid instruction that updates T
  output logic [31:0] addr,
  // store data: read in this stage through register-file port S, with the
  // results of Memory and Writeback forwarded
  output logic [4:0]  sreg,
  input  logic [31:0] qs,
  input  ctl_t        me_c,
  input  logic [31:0] me_val,
  input  logic        wb_we,
  input  logic [4:0]  wb_wa,
  input  logic [31:0] wb_val,
  output logic [31:0] sd,
  output logic [31:0] mul_p
);

  ctl_t        c_q;
  logic [31:0] alu_a, alu_b, sh_a;
  logic [4:0]  sh_amt;
  logic [15:0] mul_a, mul_b;
  logic [31:0] alu_y, sh_y;
  logic        alu_t, sh_t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q    <= ctl_nop();
      alu_a  <= '0;
      alu_b  <= '0;
      sh_a   <= '0;
      sh_amt <= '0;
      mul_a  <= '0;
      mul_b  <= '0;
    end else if (flush) begin
      c_q.valid <= 1'b0;
    end else if (load) begin
      c_q <= din.c;
      if (din.c.valid) begin
        unique case (din.c.unit)
          U_ALU: begin alu_a <= din.a; alu_b <= din.b; end
          U_SH:  begin sh_a <= din.a; sh_amt <= din.b[4:0]; end
          U_MUL: begin mul_a <= din.a[15:0]; mul_b <= din.b[15:0]; end
          default: ;
        endcase
      end
    end
  end

  cr32_alu u_alu (
    .op(c_q.alu_op), .a(alu_a), .b(alu_b), .t_in(t_in), .y(alu_y), .t_out(alu_t)
  );

  cr32_shifter u_sh (
    .op(c_q.sh_op), .a(sh_a), .amt(sh_amt), .t_in(t_in), .y(sh_y), .t_out(sh_t)
  );

  cr32_mult u_mul (
    .clk(clk), .rst_n(rst_n),
    .adv(adv && c_q.valid && c_q.unit == U_MUL),
    .a(mul_a), .b(mul_b), .p(mul_p)
  );

  always_comb begin
    c     = c_q;
    res   = (c_q.unit == U_SH) ? sh_y : alu_y;
    t_out = (c_q.unit == U_SH) ? sh_t : alu_t;
    t_we  = c_q.valid && c_q.t_we;
    addr  = c_q.addr_sum ? alu_y : alu_a;
    sreg  = c_q.sreg;
    if (!c_q.sdr)                                    sd = 32'd0;
    else if (me_c.valid && me_c.we && me_c.wd == c_q.sreg) sd = me_val;
    else if (wb_we && wb_wa == c_q.sreg)             sd = wb_val;
    else                                             sd = qs;
  end

endmodule
