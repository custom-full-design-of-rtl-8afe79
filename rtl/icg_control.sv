// icg_control: clock-gating control of the execution units.
//
// Watches the instruction the decoder is working on and opens the clock
// gate of exactly the unit that instruction needs: the 64-operation ALU, the
// barrel shifter rotator or the universal shift rotator. The gate opens only
// if the instruction will really move into Execute at the next edge, which
// means it is valid, not held by a stall and not flushed by a taken branch.
// At that edge the chosen unit captures its operands, and the other two get
// no clock edge at all. A bubble, a load, a store, a branch or a halt opens
// no gate. At most one enable is high, so the ALU and the shifters exclude
// each other.
//
// Purely combinational. The enables feed icg_cell instances, whose latches
// sample them while clk is low, so each decision acts on the next rising
// edge. The enables must therefore settle before that edge. Deriving the
// enables from the decoded instruction type, and the mutual exclusion of
// ALU and shifters, come from the published design. Qualifying them with
// stall and flush is this design's choice.
module icg_control
  import risc_pkg::*;
(
  input  logic  id_valid,   // Decode holds a real instruction
  input  unit_e id_unit,    // unit it needs
  input  logic  stall,      // Decode is held this cycle
  input  logic  flush,      // Decode is being squashed this cycle
  output logic  alu_en,
  output logic  bs_en,
  output logic  ur_en
);
  logic advance;

  always_comb begin
    advance = id_valid && !stall && !flush;
    alu_en  = advance && (id_unit == UNIT_ALU);
    bs_en   = advance && (id_unit == UNIT_BS);
    ur_en   = advance && (id_unit == UNIT_UR);
  end
endmodule
