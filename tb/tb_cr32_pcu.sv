// tb_cr32_pcu: self-checking test of the Pipeline Control Unit. The unit is
// combinational; every input is driven at random for many vectors and the
// outputs are compared with a reference model written from the advance
// equations, stall reasons and exception priority listed in cr32_pcu. A few
// directed cases follow (interrupt masked on a branch, break mode entry).
module tb_cr32_pcu;
  import cr32_pkg::*;
  logic id_busy, id_noexc;
  logic id_valid, id_is_br, id_is_reti, id_slot, id_iabrt, du_hazard, du_reads_t,
        du_reads_sr, br_reads_t, br_taken_delayed, ex_valid, ex_cop, ex_sr_we,
        ex_bitop, me_valid, me_bitop, me_rdy, me_access, wb_valid;
  sr_t sr;
  logic PBWAIT, DABRT, COPXEN, COPMEN, COPWEN, COPEXP, nIRQ, nFRQ, BKREQ;
  logic mv_if, mv_id, mv_ex, mv_me, mv_wb, stall_id, flush_id, flush_ex, flush_me,
        exc, reti_go, STXEN, STMEN, STWEN, STEXP, BKMODE;
  exc_t cause;
  int checks = 0, failures = 0;

  cr32_pcu dut (.*);

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h expected %h", w, g, e); end
  endtask

  task automatic model_check();
    logic st, ex_ok, e_mv_wb, e_mv_me, e_mv_ex, e_mv_id;
    exc_t ec;
    st = id_valid && (du_hazard || (ex_valid && ex_sr_we) ||
         ((du_reads_t || br_reads_t) && (ex_bitop || me_bitop)) ||
         ((du_reads_sr || id_is_reti) && (ex_valid || me_valid)) ||
         (br_taken_delayed && PBWAIT));
    ex_ok = id_valid && !id_is_br && !id_slot && !id_noexc;
    if (me_access && DABRT) ec = EXC_DABRT;
    else if (COPEXP && ex_valid && ex_cop) ec = EXC_COP;
    else if (id_valid && id_iabrt) ec = EXC_IABRT;
    else if (ex_ok && !nFRQ && sr.fe) ec = EXC_FIQ;
    else if (ex_ok && !nIRQ && sr.ie) ec = EXC_IRQ;
    else ec = EXC_NONE;
    e_mv_wb = COPWEN;
    e_mv_me = e_mv_wb && COPMEN && me_rdy;
    e_mv_ex = e_mv_me && COPXEN;
    e_mv_id = e_mv_ex && !st && ec == EXC_NONE;
    chk("stall_id", 32'(stall_id), 32'(st));
    chk("cause", 32'(cause), 32'(ec));
    chk("mv", {mv_wb, mv_me, mv_ex, mv_id},
        {e_mv_wb, e_mv_me, e_mv_ex, e_mv_id});
    chk("mv_if", 32'(mv_if), 32'(e_mv_id && !PBWAIT && !id_busy && !(BKREQ && !(id_valid && id_is_br))));
    chk("flushes", {flush_me, flush_ex, flush_id, STEXP},
        {ec == EXC_DABRT, ec == EXC_DABRT || ec == EXC_COP, ec != EXC_NONE, ec == EXC_DABRT});
    chk("coprocessor enables", {STWEN, STMEN, STXEN}, {1'b1, me_rdy, me_rdy});
    chk("reti_go", 32'(reti_go), 32'(e_mv_id && id_valid && id_is_reti));
    chk("BKMODE", 32'(BKMODE), 32'(BKREQ && !id_valid && !ex_valid && !me_valid && !wb_valid));
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      {id_valid, id_is_br, id_is_reti, id_slot, id_iabrt, du_hazard, du_reads_t,
       du_reads_sr, br_reads_t, br_taken_delayed, ex_valid, ex_cop, ex_sr_we,
       ex_bitop, me_valid, me_bitop, me_access, wb_valid} = 18'($urandom);
      // bias rare conditions low so that the advancing paths are exercised
      {me_rdy, COPXEN, COPMEN, COPWEN} = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hF;
      {PBWAIT, DABRT, COPEXP, BKREQ} = ($urandom_range(0, 1) == 0) ? 4'($urandom) : 4'h0;
      {nIRQ, nFRQ} = 2'($urandom);
      {id_busy, id_noexc} = ($urandom_range(0, 3) == 0) ? 2'($urandom) : 2'b00;
      sr = sr_t'(6'($urandom));
      #1 model_check();
    end
    // directed: interrupt pending, instruction in Decode is a branch
    {id_valid, id_is_br, id_is_reti, id_slot, id_iabrt, du_hazard, du_reads_t,
     du_reads_sr, br_reads_t, br_taken_delayed, ex_valid, ex_cop, ex_sr_we,
     ex_bitop, me_valid, me_bitop, me_access, wb_valid} = '0;
    {me_rdy, COPXEN, COPMEN, COPWEN} = 4'hF;
    {id_busy, id_noexc} = 2'b00;
    {PBWAIT, DABRT, COPEXP, BKREQ} = 4'h0;
    sr = SR_RESET; sr.ie = 1; nIRQ = 0; nFRQ = 1;
    id_valid = 1; id_is_br = 1;
    #1 chk("no interrupt on a branch", 32'(exc), 0);
    id_is_br = 0; id_slot = 1;
    #1 chk("no interrupt on a delay slot", 32'(exc), 0);
    id_slot = 0;
    #1 chk("interrupt taken", 32'(cause), 32'(EXC_IRQ));
    id_noexc = 1;
    #1 chk("no interrupt inside a multi-cycle instruction", 32'(exc), 0);
    id_noexc = 0; id_busy = 1;
    #1 chk("no fetch while Decode is busy", 32'(mv_if), 0);
    id_busy = 0;
    sr.ie = 0;
    #1 chk("interrupt masked", 32'(exc), 0);
    id_valid = 0; BKREQ = 1;
    #1 chk("break mode when empty", 32'(BKMODE), 1);
    chk("fetch stopped by break request", 32'(mv_if), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
