// cr32_mu: Memory Unit, the Memory stage of the CalmRISC-32 pipeline.
//
// Drives the data memory interface for the instruction in the Memory stage:
// address DA, chip select NDMCS (active low), write strobe DMWR, access size
// DSIZE (byte, half-word, word) and the write data DO, and picks the load
// data out of DI. Data is little-endian: the byte at address A travels on
// lane A[1:0] of the 32-bit buses, stores replicate the datum on all lanes.
// Loads zero-extend. DBWAIT holds the stage (the memory is not ready).
//
// The bit operations (bits, bitr, bitc, bitt) run here as the document
// describes: a byte read, then, except for bitt, a second cycle that writes
// the byte back with the bit set, reset or complemented. T receives the
// original value of the bit, so bits/bitr serve as test-and-set and
// test-and-reset. The stage is busy (`rdy` low) during the read cycle of a
// read-modify-write.
//
// Coprocessor transfers: cld load (memory -> coprocessor) is a read cycle whose
// data the coprocessor takes from the read bus; cld store is a write cycle
// with DOE low, because the coprocessor drives the write bus; a core-to-
// coprocessor move drives DO with DOE high and no memory cycle; a coprocessor-
// to-core move takes DI, again without a memory cycle. This bus sharing is
// this design's reading of the document's global data bus.
//
// Timing: the stage register loads at the rising edge when `load` is high
// (the stage hands its instruction to Writeback and takes the next one, or a
// bubble); `flush` kills the instruction. Memory reads are taken
// combinationally in the cycle the address is out (the memory answers within
// the cycle or raises DBWAIT); writes happen at the end of the cycle.
module cr32_mu
  import cr32_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        flush,
  input  exme_t       din,
  input  logic [31:0] mul_p,
  // data memory
  output logic [31:0] DA,
  output logic [31:0] DO,
  output logic        DOE,
  input  logic [31:0] DI,
  output logic        NDMCS,
  output logic        DMWR,
  output logic [1:0]  DSIZE,
  input  logic        DBWAIT,
  // to the pipeline
  output ctl_t        c,
  output logic        rdy,      // stage can hand over at the next edge
  output logic        access,   // a data memory cycle is in progress
  output logic [31:0] val,      // result for Writeback / forwarding
  output logic        t_we,     // bit operation delivers T (with adv)
  output logic        t_out
);

  exme_t      q;
  logic       ph;          // read-modify-write: 0 = read cycle, 1 = write cycle
  logic [7:0] orig;        // byte read in the first cycle
  logic [7:0] byte_in, byte_new;
  logic [31:0] lane;
  logic        rmw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      q.c     <= ctl_nop();
      ph      <= 1'b0;
      orig    <= '0;
    end else if (flush) begin
      q.c.valid <= 1'b0;
      ph        <= 1'b0;
    end else if (load) begin
      q  <= din;
      ph <= 1'b0;
    end else if (q.c.valid && rmw && !ph && !DBWAIT) begin
      ph   <= 1'b1;
      orig <= byte_in;
    end
  end

  always_comb begin
    c       = q.c;
    rmw     = (q.c.mem == M_BIT) && (q.c.bitop != BIT_TST);
    lane    = DI >> {q.addr[1:0], 3'b000};
    byte_in = lane[7:0];
    byte_new = orig;
    unique case (q.c.bitop)
      BIT_SET: byte_new[q.c.bitno] = 1'b1;
      BIT_RST: byte_new[q.c.bitno] = 1'b0;
      BIT_CPL: byte_new[q.c.bitno] = ~orig[q.c.bitno];
      default: ;
    endcase

    DA     = q.addr;
    DSIZE  = q.c.size;
    access = q.c.valid && (q.c.mem inside {M_LD, M_ST, M_BIT, M_CLD, M_CST});
    NDMCS  = ~access;
    DMWR   = q.c.valid && ((q.c.mem == M_ST) || (q.c.mem == M_CST) ||
                           (q.c.mem == M_BIT && ph));
    DOE    = q.c.valid && ((q.c.mem == M_ST) || (q.c.mem == M_MTC) ||
                           (q.c.mem == M_BIT && ph));
    unique case (q.c.size)
      SZ_B:    DO = {4{q.sd[7:0]}};
      SZ_H:    DO = {2{q.sd[15:0]}};
      default: DO = q.sd;
    endcase
    if (q.c.mem == M_BIT) DO = {4{byte_new}};
    if (q.c.mem == M_MTC) DO = q.sd;

    rdy = !q.c.valid || ((!access || !DBWAIT) && !(rmw && !ph));

    unique case (q.c.size)
      SZ_B:    val = {24'd0, lane[7:0]};
      SZ_H:    val = {16'd0, lane[15:0]};
      default: val = DI;
    endcase
    if (q.c.mem == M_MFC)      val = DI;
    else if (q.c.unit == U_MUL) val = mul_p;
    else if (q.c.mem != M_LD)   val = q.res;

    t_we  = q.c.valid && (q.c.mem == M_BIT);
    t_out = rmw ? orig[q.c.bitno] : byte_in[q.c.bitno];
  end

endmodule
