// tb_cr32_pagu: self-checking test of the program address generation unit.
// Sequential fetch across a 256-byte boundary (the upper-PC enable must fire
// exactly once there and nowhere else), taken and not-taken T branches,
// delayed and non-delayed forms with their link values, a brec on an
// external condition, a jump to a register, reti to the saved PC, and an
// exception redirect. Branch targets are worked out here from the encoding.
module tb_cr32_pagu;
  import cr32_pkg::*;
  logic clk = 0, rst_n = 0;
  logic fetch_adv = 0, br_load = 0, id_adv = 0, br_valid = 0, t = 0, redirect = 0;
  logic [15:0] ins = 0;
  logic [3:0] ec = 0;
  logic [31:0] reg_val = 0, spc = 0, redirect_pc = 0, pc, id_pc, link_val;
  br_type_t br_type;
  logic [3:0] br_rs;
  logic taken, delayed, link, hi_en;
  int checks = 0, failures = 0, n_hi = 0;

  always #5 clk = ~clk;

  cr32_pagu dut (.*);

  always @(posedge clk) if (hi_en) n_hi++;

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h expected %h", w, g, e); end
  endtask

  // latch a branch into Decode: it is fetched at the current pc
  task automatic fetch_branch(logic [15:0] w);
    @(negedge clk); ins = w; br_load = 1; fetch_adv = 1; id_adv = 1; br_valid = 0;
    @(posedge clk); #1; br_load = 0; br_valid = 1;
  endtask

  initial begin
    logic [31:0] bpc;
    repeat (2) @(posedge clk);
    chk("reset pc", pc, VEC_RESET);
    rst_n = 1;
    @(negedge clk); redirect = 1; redirect_pc = 32'h0000_00F0;
    @(posedge clk); #1 redirect = 0;
    chk("redirect", pc, 32'hF0);
    n_hi = 0;
    // sequential fetch F0 .. 110: upper bits change once (at 0x100)
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); fetch_adv = 1; id_adv = 1;
      @(posedge clk); #1;
      chk("sequential", pc, 32'hF0 + 32'(2 * (i + 1)));
    end
    chk("upper PC updates", n_hi, 1);
    // BR_T taken, delayed, disp = +5 halfwords
    bpc = pc;
    fetch_branch({3'b110, BR_T, 1'b1, 9'd5});
    t = 1; #1;
    chk("id_pc", id_pc, bpc);
    chk("taken", {31'd0, taken}, 1);
    chk("delayed", {31'd0, delayed}, 1);
    @(posedge clk); #1;
    chk("BR_T target", pc, bpc + 10);
    // BR_T not taken
    bpc = pc; br_valid = 0;
    fetch_branch({3'b110, BR_T, 1'b0, -9'sd3});
    t = 0; #1;
    chk("BR_T not taken", {31'd0, taken}, 0);
    @(posedge clk); #1;
    chk("not taken pc", pc, bpc + 4);
    // CALL non-delayed, backwards
    bpc = pc;
    fetch_branch({3'b110, BR_CALL, 1'b0, -9'sd20});
    chk("link", {31'd0, link}, 1);
    chk("link value", link_val, bpc + 2);
    @(posedge clk); #1;
    chk("CALL target", pc, bpc - 40);
    // brec on EC[2]
    bpc = pc;
    fetch_branch({3'b110, BR_EC, 1'b1, 2'd2, 7'd9});
    ec = 4'b0100; #1;
    chk("brec taken", {31'd0, taken}, 1);
    ec = 4'b1011; #1;
    chk("brec not taken", {31'd0, taken}, 0);
    ec = 4'b0100; #1;
    @(posedge clk); #1;
    chk("brec target", pc, bpc + 18);
    // JAL to a register, delayed
    bpc = pc;
    fetch_branch({3'b110, BR_JAL, 1'b1, 5'd0, 4'd7});
    reg_val = 32'h0001_2345;
    chk("jal rs", {28'd0, br_rs}, 7);
    chk("jal link", link_val, bpc + 4);
    @(posedge clk); #1;
    chk("jal target", pc, 32'h0001_2344);
    // RETI: never delayed, to spc
    spc = 32'h0000_0ABC;
    fetch_branch({3'b110, BR_RETI, 1'b1, 9'd0});
    chk("reti not delayed", {31'd0, delayed}, 0);
    @(posedge clk); #1;
    chk("reti target", pc, 32'hABC);
    // hold: nothing advances
    br_valid = 0; fetch_adv = 0; id_adv = 0; bpc = pc;
    @(posedge clk); #1;
    chk("hold", pc, bpc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
