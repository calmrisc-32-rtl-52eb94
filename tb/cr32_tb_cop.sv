// cr32_tb_cop: behavioural model of a passive coprocessor for testbenches.
//
// Not part of the design: it stands in for a coprocessor such as an FPU so
// that the core's coprocessor interface can be exercised. It mirrors the
// core's pipeline with the synchronisation signals: an instruction enters its
// Execute slot when NCOPID is low, moves to Memory when both pipelines'
// Execute stages advance, and completes when both Memory stages advance.
// Sixteen 32-bit registers c0..c15. Instructions it understands (imm13):
//   [12:11]=11  cld: [10]=0 load c[3:0] from the read bus, =1 drive c[3:0]
//               on the write bus
//   [12:11]=10  transfer: [10]=0 c[5:0] <= core write bus, =1 drive c[5:0]
//               on the read bus
//   [12:11]=00  [10:8]=0 cadd c[5:4] = c[3:2] + c[1:0], holding COPMEN low
//               for two cycles in Execute; =1 set EC to [3:0]; =2 a faulting
//               operation: COPMEN low for two cycles, then COPEXP for one
// COPXEN and COPWEN are always 1.
module cr32_tb_cop (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [12:0] COPIR,
  input  logic        NCOPID,
  input  logic        STXEN,
  input  logic        STMEN,
  input  logic        STWEN,
  input  logic        STEXP,
  input  logic        EXPTAG,
  output logic        COPXEN,
  output logic        COPMEN,
  output logic        COPWEN,
  output logic        COPEXP,
  output logic [3:0]  EC,
  input  logic [31:0] db_core,   // write bus (core DO when the core drives it)
  input  logic [31:0] core_db,   // read bus as seen by the coprocessor
  output logic        drive_db_core,
  output logic        drive_core_db,
  output logic [31:0] cop_data
);

  logic [31:0] cr [16];
  logic        ex_v, me_v;
  logic [12:0] ex_i, me_i;
  logic [1:0]  cnt;
  logic        exp_q, slow, fault, mv_me, mv_ex;

  always_comb begin
    slow   = ex_v && ex_i[12:11] == 2'b00 && (ex_i[10:8] == 3'd0 || ex_i[10:8] == 3'd2);
    fault  = ex_v && ex_i[12:11] == 2'b00 && ex_i[10:8] == 3'd2;
    COPXEN = 1'b1;
    COPWEN = 1'b1;
    COPMEN = !(slow && (cnt < 2'd2 || fault));
    COPEXP = exp_q;
    mv_me  = STWEN && COPWEN && STMEN && COPMEN;
    mv_ex  = mv_me && STXEN && COPXEN;
    drive_core_db = me_v && me_i[12:10] == 3'b101;
    drive_db_core = me_v && me_i[12:10] == 3'b111;
    cop_data = (me_i[12:11] == 2'b10) ? cr[me_i[3:0]] : cr[me_i[3:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_v <= 1'b0; me_v <= 1'b0; cnt <= '0; exp_q <= 1'b0; EC <= '0;
      ex_i <= '0; me_i <= '0;
      for (int i = 0; i < 16; i++) cr[i] <= '0;
    end else begin
      exp_q <= 1'b0;
      if (slow && !mv_ex) cnt <= (cnt == 2'd3) ? cnt : cnt + 2'd1;
      if (fault && cnt == 2'd2 && !exp_q) exp_q <= 1'b1;
      // Memory-stage completion
      if (mv_me && me_v) begin
        if (me_i[12:10] == 3'b110) cr[me_i[3:0]] <= core_db;   // cld load
        if (me_i[12:10] == 3'b100) cr[me_i[3:0]] <= db_core;   // core -> cop
        if (me_i[12:11] == 2'b00 && me_i[10:8] == 3'd0)
          cr[me_i[5:4]] <= cr[me_i[3:2]] + cr[me_i[1:0]];
        if (me_i[12:11] == 2'b00 && me_i[10:8] == 3'd1) EC <= me_i[3:0];
      end
      if (mv_me) me_v <= mv_ex && ex_v;
      if (mv_ex) begin
        me_i <= ex_i;
        cnt  <= '0;
      end
      if (mv_ex || !ex_v) begin
        ex_v <= !NCOPID;
        ex_i <= COPIR;
      end
      if (STEXP) begin ex_v <= 1'b0; me_v <= 1'b0; end
      if (exp_q) begin ex_v <= 1'b0; cnt <= '0; end
    end
  end

endmodule
