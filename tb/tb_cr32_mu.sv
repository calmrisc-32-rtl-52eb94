// tb_cr32_mu: self-checking test of the Memory Unit. A 256-byte data memory
// model answers reads in the same cycle and takes writes at the rising edge,
// byte-lane enabled by DSIZE and DA[1:0]. Random loads and stores of every
// size are compared with a reference copy of the memory, with DBWAIT raised
// at random; the two-cycle bit operations are checked for the written byte
// and the T bit; the coprocessor transfers are checked for their bus control
// (chip select, write strobe, DOE) and the multiplier result selection.
module tb_cr32_mu;
  import cr32_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, flush = 0;
  exme_t din;
  logic [31:0] mul_p = 32'h1234_5678;
  logic [31:0] DA, DO, DI;
  logic DOE, NDMCS, DMWR, DBWAIT = 0;
  logic [1:0] DSIZE;
  ctl_t c;
  logic rdy, access, t_we, t_out;
  logic [31:0] val;
  logic [7:0] mem [256], ref_mem [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cr32_mu dut (.*);

  assign DI = {mem[{DA[7:2], 2'd3}], mem[{DA[7:2], 2'd2}],
               mem[{DA[7:2], 2'd1}], mem[{DA[7:2], 2'd0}]};
  always @(posedge clk)
    if (rst_n && !NDMCS && DMWR && !DBWAIT)  // pins are unknown until reset has acted
      for (int i = 0; i < 4; i++)
        if ((DSIZE == SZ_W) || (DSIZE == SZ_H && i[1] == DA[1]) ||
            (DSIZE == SZ_B && i[1:0] == DA[1:0]))
          mem[{DA[7:2], i[1:0]}] <= DO[8*i +: 8];

  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h expected %h", w, g, e); end
  endtask

  // issue one operation; returns the value seen in the cycle it completes
  task automatic run(input mem_op_t op, input dsize_t sz, input logic [7:0] a,
                     input logic [31:0] sd, input bit_op_t bop, input logic [2:0] bn,
                     input bit waits, output logic [31:0] v, output logic t);
    @(negedge clk);
    din = '0; din.c = ctl_nop(); din.c.valid = 1; din.c.mem = op; din.c.size = sz;
    din.c.bitop = bop; din.c.bitno = bn; din.addr = {24'd0, a}; din.sd = sd;
    din.res = 32'hDEAD_0000;
    load = 1;
    @(posedge clk); #1 load = 0;
    forever begin
      DBWAIT = waits && ($urandom_range(0, 2) == 0);
      #1;
      if (rdy) break;
      @(posedge clk); #1;
    end
    v = val; t = t_out;
    @(posedge clk); #1 DBWAIT = 0;
    din.c.valid = 0; @(negedge clk); load = 1; @(posedge clk); #1 load = 0;
  endtask

  initial begin
    logic [31:0] v, e;
    logic t;
    logic [7:0] a;
    dsize_t sz;
    for (int i = 0; i < 256; i++) begin mem[i] = 8'(i * 7 + 3); ref_mem[i] = mem[i]; end
    din = '0; din.c = ctl_nop();
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk("idle: no chip select", {31'd0, NDMCS}, 1);
    chk("idle: ready", {31'd0, rdy}, 1);
    for (int n = 0; n < 400; n++) begin
      sz = dsize_t'($urandom_range(0, 2));
      a = 8'($urandom);
      if (sz == SZ_W) a[1:0] = 0;
      if (sz == SZ_H) a[0] = 0;
      if ($urandom_range(0, 1)) begin
        e = 32'($urandom);
        run(M_ST, sz, a, e, BIT_SET, 0, 1, v, t);
        for (int i = 0; i < (sz == SZ_W ? 4 : sz == SZ_H ? 2 : 1); i++)
          ref_mem[a + 8'(i)] = e[8*i +: 8];
      end else begin
        run(M_LD, sz, a, 0, BIT_SET, 0, 1, v, t);
        e = {ref_mem[a + 8'd3], ref_mem[a + 8'd2], ref_mem[a + 8'd1], ref_mem[a]};
        if (sz == SZ_B) e = {24'd0, e[7:0]};
        if (sz == SZ_H) e = {16'd0, e[15:0]};
        chk("load", v, e);
      end
    end
    for (int i = 0; i < 256; i++) chk("memory after stores", 32'(mem[i]), 32'(ref_mem[i]));
    // bit operations
    for (int n = 0; n < 200; n++) begin
      bit_op_t bo;
      logic [2:0] bn;
      logic [7:0] ob, nb;
      bo = bit_op_t'($urandom_range(0, 3));
      bn = 3'($urandom);
      a = 8'($urandom);
      ob = ref_mem[a];
      run(M_BIT, SZ_B, a, 0, bo, bn, 1, v, t);
      nb = ob;
      if (bo == BIT_SET) nb[bn] = 1;
      if (bo == BIT_RST) nb[bn] = 0;
      if (bo == BIT_CPL) nb[bn] = ~ob[bn];
      ref_mem[a] = nb;
      chk("bit op T", {31'd0, t}, {31'd0, ob[bn]});
      chk("bit op byte", 32'(mem[a]), 32'(nb));
    end
    // coprocessor transfers: bus control seen while the operation is in the stage
    @(negedge clk);
    din = '0; din.c = ctl_nop(); din.c.valid = 1; din.addr = 32'h40; din.sd = 32'hCAFE_F00D;
    din.c.mem = M_MTC; load = 1; @(posedge clk); #1 load = 0;
    chk("mtc bus", {NDMCS, DMWR, DOE}, 3'b101);
    chk("mtc data", DO, 32'hCAFE_F00D);
    @(negedge clk); din.c.mem = M_MFC; load = 1; @(posedge clk); #1 load = 0;
    chk("mfc bus", {NDMCS, DMWR, DOE}, 3'b100);
    chk("mfc value", val, DI);
    @(negedge clk); din.c.mem = M_CLD; load = 1; @(posedge clk); #1 load = 0;
    chk("cld read cycle", {NDMCS, DMWR, DOE}, 3'b000);
    @(negedge clk); din.c.mem = M_CST; load = 1; @(posedge clk); #1 load = 0;
    chk("cst write cycle, coprocessor drives", {NDMCS, DMWR, DOE}, 3'b010);
    chk("cst address", DA, 32'h40);
    @(negedge clk); din.c.mem = M_NONE; din.c.unit = U_MUL; load = 1; @(posedge clk); #1 load = 0;
    chk("multiplier result", val, 32'h1234_5678);
    chk("no access", {31'd0, access}, 0);
    @(negedge clk); din.c.unit = U_ALU; din.res = 32'h55; load = 1; @(posedge clk); #1 load = 0;
    chk("execute result", val, 32'h55);
    flush = 1; @(posedge clk); #1 flush = 0;
    chk("flush", {31'd0, c.valid}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
