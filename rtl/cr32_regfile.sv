// cr32_regfile: general-purpose register file of the CalmRISC-32 core.
//
// Thirty-two 32-bit registers are held as four sets of eight. An instruction
// names sixteen logical registers r0..r15; the current mode and the register
// selection bits of sr pick which two sets those sixteen are (see
// cr32_pkg::phys_reg): user mode always sees sets 0 and 1, privileged mode
// chooses set 0 or 2 for r0..r7 and set 1 or 3 for r8..r15. This split into
// four sets and the two-of-four selection follow the document; which sr bits
// select which set is this design's choice.
//
// Interface: two combinational read ports addressed by logical number, a
// third read port addressed by physical number for the store data that the
// Execute stage reads, a
// mapping port that turns a logical destination into its physical number (the
// decoder carries physical numbers down the pipeline, so a later change of sr
// cannot redirect a write already in flight), and one write port addressed by
// physical number, written at the rising clock edge. Reads do not see a write
// of the same cycle; the decoder forwards it instead. All registers reset to 0.
module cr32_regfile
  import cr32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sr_t         sr,
  input  logic [3:0]  ra,      // logical read address, port A
  input  logic [3:0]  rb,      // logical read address, port B
  input  logic [3:0]  rd,      // logical destination to map
  output logic [4:0]  ra_p,    // physical numbers of the above
  output logic [4:0]  rb_p,
  output logic [4:0]  rd_p,
  output logic [31:0] qa,
  output logic [31:0] qb,
  input  logic [4:0]  rs_p,    // physical read address, port S (store data)
  output logic [31:0] qs,
  input  logic        we,
  input  logic [4:0]  wa,      // physical write address
  input  logic [31:0] wdata
);

  logic [31:0] regs [32];

  always_comb begin
    ra_p = phys_reg(ra, sr);
    rb_p = phys_reg(rb, sr);
    rd_p = phys_reg(rd, sr);
    qa   = regs[ra_p];
    qb   = regs[rb_p];
    qs   = regs[rs_p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wdata;
    end
  end

endmodule
