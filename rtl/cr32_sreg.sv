// cr32_sreg: processor status register sr and the special registers.
//
// sr holds the T (test) bit, the interrupt enables, the privileged-mode bit
// and the register-set selection bits (layout in cr32_pkg::sr_t, which is
// this design's choice). The special register file keeps the PC and sr saved
// on an exception (spc, ssr), as the document describes; one pair is kept.
//
// Writers, in order of priority at a rising edge:
//   exception entry : spc <= exc_pc, ssr <= sr (including the writes of
//                     older instructions completing at the same edge), sr
//                     enters privileged mode with both interrupt enables off
//   return (reti)   : sr <= ssr
//   Execute stage   : move to sr / spc / ssr (value `ex_val`), or T from an
//                     arithmetic, compare or shift instruction
//   Memory stage    : T from a bit operation (older than Execute, so an
//                     Execute-stage T write of the same edge wins)
// Reset: sr = SR_RESET (privileged, interrupts off), spc = ssr = 0.
module cr32_sreg
  import cr32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        exc,
  input  logic [31:0] exc_pc,
  input  logic        reti,
  input  logic        ex_commit,  // the Execute-stage instruction completes
  input  logic        ex_t_we,
  input  logic        ex_t,
  input  logic        ex_sr_we,
  input  logic        ex_spc_we,
  input  logic        ex_ssr_we,
  input  logic [31:0] ex_val,
  input  logic        me_t_we,    // with me_commit
  input  logic        me_commit,
  input  logic        me_t,
  output sr_t         sr,
  output logic [31:0] spc,
  output logic [31:0] ssr
);

  sr_t         sr_upd;   // sr after this edge's Execute/Memory writes
  logic [31:0] spc_upd, ssr_upd;

  always_comb begin
    sr_upd  = sr;
    spc_upd = spc;
    ssr_upd = ssr;
    if (me_commit && me_t_we) sr_upd.t = me_t;
    if (ex_commit) begin
      if (ex_sr_we)     sr_upd   = sr_t'(ex_val[SR_W-1:0]);
      else if (ex_t_we) sr_upd.t = ex_t;
      if (ex_spc_we)    spc_upd  = ex_val;
      if (ex_ssr_we)    ssr_upd  = ex_val;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= SR_RESET;
      spc <= '0;
      ssr <= '0;
    end else if (exc) begin
      spc   <= exc_pc;
      ssr   <= {{(32-SR_W){1'b0}}, sr_upd};
      sr    <= sr_upd;
      sr.pm <= 1'b1;
      sr.ie <= 1'b0;
      sr.fe <= 1'b0;
    end else if (reti) begin
      sr <= sr_t'(ssr[SR_W-1:0]);
    end else begin
      sr  <= sr_upd;
      spc <= spc_upd;
      ssr <= ssr_upd;
    end
  end

endmodule
