// output_select_mux: 64-bit output selection multiplexer.
//
// Picks the result of the execution unit that serves the instruction now in
// the Execute stage: the ALU, the barrel shifter rotator or the universal
// shift rotator. UNIT_NONE (loads, stores, branches, bubbles) gives zero.
// Purely combinational; its output is the instruction's execution result,
// which goes on to the Data Out register, the forwarding network and the
// Execute/Memory result register. The three-input mux in front of the Data Out register
// is the document's; the zero for UNIT_NONE is this design's choice.
module output_select_mux
  import risc_pkg::*;
(
  input  unit_e sel,
  input  word_t alu_res,
  input  word_t bs_res,
  input  word_t ur_res,
  output word_t y
);
  always_comb begin
    unique case (sel)
      UNIT_ALU: y = alu_res;
      UNIT_BS:  y = bs_res;
      UNIT_UR:  y = ur_res;
      default:  y = '0;
    endcase
  end
endmodule
