// cr32_shifter: the 32-bit barrel shifter of the CalmRISC-32 execute stage.
//
// Operations (from the document's list): sl (shift left), sr (logical shift
// right), sra (arithmetic shift right), rr/rl (rotate right/left) by 0..31
// places, and rrc (rotate right through T). The amount is the low five bits
// of the second operand. rrc rotating by exactly one place through T, with
// T receiving the bit shifted out, is this design's reading; the other
// operations leave T unchanged. Built as a five-level logarithmic shifter on
// a right-rotating core: left operations reverse the word before and after.
// Purely combinational.
module cr32_shifter
  import cr32_pkg::*;
(
  input  sh_op_t      op,
  input  logic [31:0] a,
  input  logic [4:0]  amt,
  input  logic        t_in,
  output logic [31:0] y,
  output logic        t_out
);

  function automatic logic [31:0] rev(input logic [31:0] v);
    for (int i = 0; i < 32; i++) rev[i] = v[31-i];
  endfunction

  logic        left, rot;
  logic        fill;
  logic [31:0] src, stage [6];
  logic [31:0] mask;

  always_comb begin
    left = (op == SH_SL) || (op == SH_RL);
    rot  = (op == SH_RR) || (op == SH_RL);
    fill = (op == SH_SRA) ? a[31] : 1'b0;
    src  = left ? rev(a) : a;
    // right rotation by amt, five levels
    stage[0] = src;
    for (int l = 0; l < 5; l++) begin
      stage[l+1] = amt[l] ? ((stage[l] >> (1 << l)) | (stage[l] << (32 - (1 << l))))
                          : stage[l];
    end
    // bits that wrapped around are the top amt bits of the rotated word
    mask = ~(32'hFFFF_FFFF >> amt);
    stage[5] = rot ? stage[5] : ((stage[5] & ~mask) | (fill ? mask : 32'd0));
    y     = left ? rev(stage[5]) : stage[5];
    t_out = t_in;
    if (op == SH_RRC) begin
      y     = {t_in, a[31:1]};
      t_out = a[0];
    end
  end

endmodule
