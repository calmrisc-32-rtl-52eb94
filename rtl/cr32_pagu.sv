// cr32_pagu: Program Address Generation Unit of the CalmRISC-32 core.
//
// Spans Fetch and Decode. It holds the fetch PC, the PC of the instruction in
// Decode, and the branch latch: a branch found by the pre-decoder is latched
// here instead of in the decoder's instruction register, and is resolved here
// in the Decode stage. Branch kinds (field [12:10] of a branch):
//   BR_T/BR_F  taken if T is 1/0          BR_A   always
//   BR_CALL    always, return address to r14
//   BR_EC      taken if EC[n] (external condition from the coprocessor)
//   BR_JMP     to register                BR_JAL to register, link to r14
//   BR_RETI    to the saved exception PC, restores sr, never delayed
// Bit [9] selects the delayed form: the instruction after the branch (the
// delay slot, already being fetched) is executed. In the non-delayed form the
// caller discards it. PC-relative targets are branch PC + 2*disp (disp9 for
// BR_T..BR_CALL, disp7 in [6:0] for BR_EC with the condition number in
// [8:7]). The link is the address after the delay slot (or after the branch).
//
// Low-power PC: the PC is kept as a lower part (bits PC_SPLIT-1:0) and an
// upper part with its own enable, which fires only when the upper bits
// actually change (a carry out of the lower part or a far branch). This is
// the document's dual-clock PC, written as a clock enable; `hi_en` shows it.
//
// Timing: all registers change at the rising edge. `fetch_adv` moves the
// fetched instruction into Decode; `id_adv` means the instruction in Decode
// leaves it, which is when a branch redirects the PC. `redirect` (exception
// entry) has priority and loads `redirect_pc`.
module cr32_pagu
  import cr32_pkg::*;
#(
  parameter int unsigned PC_SPLIT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fetch_adv,
  input  logic        br_load,      // fetched instruction is a branch
  input  logic [15:0] ins,
  input  logic        id_adv,
  input  logic        br_valid,     // the instruction in Decode is a branch
  input  logic        t,            // current (forwarded) T
  input  logic [3:0]  ec,
  input  logic [31:0] reg_val,      // forwarded register for BR_JMP/BR_JAL
  input  logic [31:0] spc,
  input  logic        redirect,
  input  logic [31:0] redirect_pc,
  output logic [31:0] pc,           // fetch address
  output logic [31:0] id_pc,        // address of the instruction in Decode
  output br_type_t    br_type,
  output logic [3:0]  br_rs,
  output logic        taken,
  output logic        delayed,
  output logic        link,
  output logic [31:0] link_val,
  output logic        hi_en
);

  logic [15:0]          br_ir;
  logic [PC_SPLIT-1:0]  pc_lo;
  logic [31:PC_SPLIT]   pc_hi;
  logic [31:0]          pc_nx, target;
  logic                 pc_we;

  assign pc = {pc_hi, pc_lo};

  always_comb begin
    br_type  = br_type_t'(br_ir[12:10]);
    br_rs    = br_ir[3:0];
    delayed  = br_ir[9] && (br_type != BR_RETI);
    link     = (br_type == BR_CALL) || (br_type == BR_JAL);
    link_val = id_pc + (delayed ? 32'd4 : 32'd2);
    unique case (br_type)
      BR_T:    taken = t;
      BR_F:    taken = ~t;
      BR_EC:   taken = ec[br_ir[8:7]];
      default: taken = 1'b1;
    endcase
    unique case (br_type)
      BR_EC:           target = id_pc + {{24{br_ir[6]}}, br_ir[6:0], 1'b0};
      BR_JMP, BR_JAL:  target = {reg_val[31:1], 1'b0};
      BR_RETI:         target = spc;
      default:         target = id_pc + {{22{br_ir[8]}}, br_ir[8:0], 1'b0};
    endcase
    pc_we = 1'b1;
    if (redirect)                           pc_nx = redirect_pc;
    else if (br_valid && id_adv && taken)   pc_nx = target;
    else if (fetch_adv)                     pc_nx = pc + 32'd2;
    else begin pc_nx = pc; pc_we = 1'b0; end
    hi_en = pc_we && (pc_nx[31:PC_SPLIT] != pc_hi);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc_lo <= VEC_RESET[PC_SPLIT-1:0];
    else if (pc_we) pc_lo <= pc_nx[PC_SPLIT-1:0];
  end

  // upper PC bits: separately enabled, held most of the time
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc_hi <= VEC_RESET[31:PC_SPLIT];
    else if (hi_en) pc_hi <= pc_nx[31:PC_SPLIT];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      br_ir <= '0;
      id_pc <= '0;
    end else if (fetch_adv) begin
      id_pc <= pc;
      if (br_load) br_ir <= ins;
    end
  end

endmodule
