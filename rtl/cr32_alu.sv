// cr32_alu: the 32-bit adder and logic unit of the CalmRISC-32 execute stage.
//
// One adder serves add, sub, adc, sbc, the compares, inct/dect and the divide
// step; the logic operations and the bit test share the output multiplexer.
// The instruction list (add, sub, adc and sbc with T as carry, and, or, xor,
// tst, cmp eq/ge/gt, cmpu ge/gt, inct/dect, divl) follows the document. The
// exact T semantics are this design's choice:
//   adc/sbc : T = carry out (sbc computes a + ~b + T, carry = no borrow)
//   tst     : T = ((a & b) == 0)
//   cmp*    : T = result of the comparison (a op b), signed or unsigned
//   divl    : one restoring step of a 32/16 unsigned division. a holds
//             {partial remainder[15:0], dividend/quotient[15:0]}, b[15:0] the
//             divisor; sixteen steps leave the quotient in a[15:0] and the
//             remainder in a[31:16]. T = the new quotient bit.
//   inct/dect: y = a + T / a - T
// Other operations pass T through unchanged (t_out = t_in).
// Purely combinational.
module cr32_alu
  import cr32_pkg::*;
(
  input  alu_op_t     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        t_in,
  output logic [31:0] y,
  output logic        t_out
);

  logic [32:0] sum;
  logic [31:0] addb;
  logic        cin;
  logic        lt_s, lt_u, eq;
  logic [16:0] rem_sh, rem_sub;

  // shared adder: a + addb + cin
  always_comb begin
    addb = b;
    cin  = 1'b0;
    unique case (op)
      A_SUB, A_CMPEQ, A_CMPGE, A_CMPGT, A_CMPUGE, A_CMPUGT: begin
        addb = ~b; cin = 1'b1;
      end
      A_ADC:  cin = t_in;
      A_SBC:  begin addb = ~b; cin = t_in; end
      A_INCT: begin addb = 32'd0; cin = t_in; end
      A_DECT: begin addb = {32{t_in}}; cin = 1'b0; end
      default: ;
    endcase
    sum = {1'b0, a} + {1'b0, addb} + {32'd0, cin};
  end

  always_comb begin
    eq   = (a == b);
    lt_u = ~sum[32];                          // a - b borrowed
    lt_s = (a[31] ^ b[31]) ? a[31] : sum[31];
    rem_sh  = a[31:15];
    rem_sub = rem_sh - {1'b0, b[15:0]};
  end

  always_comb begin
    y     = sum[31:0];
    t_out = t_in;
    unique case (op)
      A_ADD, A_SUB, A_INCT, A_DECT: ;
      A_ADC, A_SBC: t_out = sum[32];
      A_AND:  y = a & b;
      A_OR:   y = a | b;
      A_XOR:  y = a ^ b;
      A_TST:  begin y = a & b; t_out = ((a & b) == 32'd0); end
      A_MOVB: y = b;
      A_CMPEQ:  t_out = eq;
      A_CMPGE:  t_out = ~lt_s;
      A_CMPGT:  t_out = ~lt_s & ~eq;
      A_CMPUGE: t_out = ~lt_u;
      A_CMPUGT: t_out = ~lt_u & ~eq;
      A_DIVL: begin
        if (rem_sh >= {1'b0, b[15:0]}) begin
          y = {rem_sub[15:0], a[14:0], 1'b1}; t_out = 1'b1;
        end else begin
          y = {rem_sh[15:0], a[14:0], 1'b0};  t_out = 1'b0;
        end
      end
      default: ;
    endcase
  end

endmodule
