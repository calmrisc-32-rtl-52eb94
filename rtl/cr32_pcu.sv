// cr32_pcu: Pipeline Control Unit of the CalmRISC-32 core.
//
// Collects the status of every stage and the stall and exception inputs from
// outside the core, and decides for each stage whether it advances this cycle
// (the mv_* outputs, applied at the next rising edge) and which stages are
// flushed. Purely combinational.
//
// Advancing: the pipeline moves in lock step from the back.
//   mv_wb = COPWEN                      Writeback completes
//   mv_me = mv_wb & COPMEN & me_rdy     Memory hands over (me_rdy: no DBWAIT,
//                                       no pending read-modify-write)
//   mv_ex = mv_me & COPXEN              Execute hands over
//   mv_id = mv_ex & !stall_id           Decode hands over
//   mv_if = mv_id & !PBWAIT & !break    a fetched instruction enters Decode
//           & !id_busy                  (not while Decode issues the further
//                                       operations of a multi-cycle instruction)
// A stage that cannot take the next instruction while the one after it moves
// on gets a bubble (done by the caller). The core's own readiness is sent to
// the coprocessor as STWEN (always 1: Writeback never waits), STMEN and STXEN
// (both = me_rdy: nothing but the Memory stage makes the core's Execute or
// Memory stage wait). The coprocessor returns COPXEN/COPMEN/COPWEN the same
// way, so that both pipelines advance together, as in the document's
// synchronisation scheme. Making ST*EN depend only on the core's own state
// (never on COP*EN) is this design's choice; it rules out loops between the
// two controllers.
//
// Decode stalls (interlocks) for: an operand that only the Memory stage will
// produce (load, multiply, coprocessor-to-core move, from cr32_du); a T bit
// still to come from a bit operation in Execute or Memory; a move to sr in
// Execute (the next instruction must see the new register-set selection);
// reads of sr or the special registers and reti, which wait until Execute and
// Memory are empty; a taken delayed branch whose delay-slot instruction has
// not been fetched yet (PBWAIT).
//
// Exceptions, highest priority first: data abort (DABRT during a data memory
// cycle: the instruction in Memory and all younger ones are flushed, STEXP is
// raised, the saved PC is that of the aborting instruction); coprocessor
// exception (COPEXP: the coprocessor instruction held in Execute and all
// younger ones are flushed, the saved PC is its PC); then, taken in Decode,
// instruction abort (IABRT flagged at fetch), fast interrupt (nFRQ, enabled
// by sr.fe) and interrupt (nIRQ, enabled by sr.ie). Interrupts are not taken
// on a branch or a delay-slot instruction in Decode, so a branch and its slot
// are never separated, nor inside a multi-cycle instruction (id_noexc).
module cr32_pcu
  import cr32_pkg::*;
(
  // stage status
  input  logic  id_valid,
  input  logic  id_is_br,
  input  logic  id_is_reti,
  input  logic  id_slot,
  input  logic  id_iabrt,
  input  logic  id_busy,      // Decode issues more operations of its instruction
  input  logic  id_noexc,     // Decode is inside a multi-cycle instruction
  input  logic  du_hazard,
  input  logic  du_reads_t,
  input  logic  du_reads_sr,
  input  logic  br_reads_t,
  input  logic  br_taken_delayed,
  input  logic  ex_valid,
  input  logic  ex_cop,
  input  logic  ex_sr_we,
  input  logic  ex_bitop,
  input  logic  me_valid,
  input  logic  me_bitop,
  input  logic  me_rdy,
  input  logic  me_access,
  input  logic  wb_valid,
  input  sr_t   sr,
  // outside the core
  input  logic  PBWAIT,
  input  logic  DABRT,
  input  logic  COPXEN,
  input  logic  COPMEN,
  input  logic  COPWEN,
  input  logic  COPEXP,
  input  logic  nIRQ,
  input  logic  nFRQ,
  input  logic  BKREQ,
  // decisions
  output logic  mv_if,
  output logic  mv_id,
  output logic  mv_ex,
  output logic  mv_me,
  output logic  mv_wb,
  output logic  stall_id,
  output logic  flush_id,
  output logic  flush_ex,
  output logic  flush_me,
  output logic  exc,
  output exc_t  cause,
  output logic  reti_go,
  output logic  STXEN,
  output logic  STMEN,
  output logic  STWEN,
  output logic  STEXP,
  output logic  BKMODE
);

  logic t_pending, id_exc_ok, bk_stop;

  always_comb begin
    t_pending = ex_bitop || me_bitop;
    stall_id  = id_valid && (
                  du_hazard ||
                  (ex_valid && ex_sr_we) ||
                  ((du_reads_t || br_reads_t) && t_pending) ||
                  ((du_reads_sr || id_is_reti) && (ex_valid || me_valid)) ||
                  (br_taken_delayed && PBWAIT));

    // exceptions
    id_exc_ok = id_valid && !id_is_br && !id_slot && !id_noexc;
    cause = EXC_NONE;
    if (me_access && DABRT)                    cause = EXC_DABRT;
    else if (COPEXP && ex_valid && ex_cop)     cause = EXC_COP;
    else if (id_valid && id_iabrt)             cause = EXC_IABRT;
    else if (id_exc_ok && !nFRQ && sr.fe)      cause = EXC_FIQ;
    else if (id_exc_ok && !nIRQ && sr.ie)      cause = EXC_IRQ;
    exc      = (cause != EXC_NONE);
    flush_me = (cause == EXC_DABRT);
    flush_ex = flush_me || (cause == EXC_COP);
    flush_id = exc;
    STEXP    = flush_me;

    bk_stop = BKREQ && !(id_valid && id_is_br);

    STWEN = 1'b1;
    STMEN = me_rdy;
    STXEN = me_rdy;
    mv_wb = COPWEN;
    mv_me = mv_wb && COPMEN && me_rdy;
    mv_ex = mv_me && COPXEN;
    mv_id = mv_ex && !stall_id && !exc;
    mv_if = mv_id && !PBWAIT && !bk_stop && !id_busy;
    reti_go = mv_id && id_valid && id_is_reti;
    BKMODE = BKREQ && !id_valid && !ex_valid && !me_valid && !wb_valid;
  end

endmodule
