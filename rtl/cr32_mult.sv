// cr32_mult: pipelined 16x16 unsigned multiplier with a latency of two cycles.
//
// The document gives a pipelined 16x16 multiply with 2-cycle latency. Here the
// first stage (Execute) forms two 16x8 partial products, a*b[7:0] and
// a*b[15:8], and registers them when `adv` is high (the Execute stage hands
// its instruction to the Memory stage); the second stage (Memory) adds them
// into the 32-bit product `p`, valid combinationally from the cycle after the
// operands were presented. Unsigned operands are this design's choice. The
// partial-product split is likewise this design's.
module cr32_mult (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adv,      // capture stage-1 partial products
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);

  logic [23:0] pp_lo, pp_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_lo <= '0;
      pp_hi <= '0;
    end else if (adv) begin
      pp_lo <= 24'(a * b[7:0]);
      pp_hi <= 24'(a * b[15:8]);
    end
  end

  assign p = {8'd0, pp_lo} + {pp_hi, 8'd0};

endmodule
