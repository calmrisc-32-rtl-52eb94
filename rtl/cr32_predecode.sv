// cr32_predecode: instruction pre-decoder of the CalmRISC-32 fetch stage.
//
// Looks only at the three most significant bits of the fetched instruction
// and tells the fetch logic where to latch it: a branch goes to the branch
// latch in the program address generation unit, everything else (including
// coprocessor instructions, whose low 13 bits are driven out on COPIR) goes
// to the instruction register of the decoder. Using 3'b111 for coprocessor
// instructions is implied by the document's 13-bit coprocessor field; 3'b110
// for branches is this design's choice. Purely combinational.
module cr32_predecode
  import cr32_pkg::*;
(
  input  logic [15:0] ins,
  output pdclass_t    cls
);

  always_comb begin
    unique case (ins[15:13])
      PD_COP_MSB:    cls = PD_COP;
      PD_BRANCH_MSB: cls = PD_BRANCH;
      default:       cls = PD_OTHER;
    endcase
  end

endmodule
