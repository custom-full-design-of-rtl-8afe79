// tb_icg_control: self-checking testbench of the clock-gating control.
//
// Tries every unit code with every combination of the Decode valid bit,
// stall and flush, and checks that exactly the needed unit's enable is high
// when the instruction will move into Execute, and that nothing is enabled
// for a bubble, a held or squashed instruction, or an instruction that uses
// no execution unit.
module tb_icg_control;
  import risc_pkg::*;

  logic  id_valid, stall, flush, alu_en, bs_en, ur_en;
  unit_e id_unit;
  int    checks = 0, failures = 0;

  icg_control dut (.id_valid, .id_unit, .stall, .flush, .alu_en, .bs_en, .ur_en);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 8; c++)
        for (int u = 0; u < 4; u++) begin
          logic [2:0] exp;
          logic       go;
          {id_valid, stall, flush} = 3'(c); id_unit = unit_e'(u);
          #1;
          go  = c[2] && !c[1] && !c[0];
          exp = !go ? 3'b000 : (u == 1) ? 3'b100 : (u == 2) ? 3'b010 : (u == 3) ? 3'b001 : 3'b000;
          checks++;
          if ({alu_en, bs_en, ur_en} !== exp) begin
            failures++;
            $display("FAIL v/s/f=%b unit=%0d got=%b exp=%b", 3'(c), u, {alu_en, bs_en, ur_en}, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
