// decoder: instruction decoder.
//
// Splits a 64-bit instruction word into the fields of risc_pkg (opcode,
// func, rd, rs1, rs2, 34-bit immediate) and turns the opcode into the
// control bundle ctrl_t: which execution unit produces the result (this is
// what the clock-gating control later uses to open exactly one unit clock),
// the ALU or shift function code, whether operand B is the sign-extended
// immediate, which source registers are read (these drive the register-file
// read enables and the hazard checks), register write, memory read/write,
// branch kind and halt. An unknown opcode decodes as a no-operation with
// valid_op low. Purely combinational.
//
// The separation of unit selects and the per-unit enables follow the
// document; the encoding itself is this design's own (see risc_pkg).
module decoder
  import risc_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);
  logic [5:0] opc;

  always_comb begin
    opc = instr[63:58];
    ctrl          = '0;
    ctrl.unit     = UNIT_NONE;
    ctrl.br       = BR_NONE;
    ctrl.func     = instr[57:52];
    ctrl.rd       = instr[51:46];
    ctrl.rs1      = instr[45:40];
    ctrl.rs2      = instr[39:34];
    ctrl.imm      = {{(XLEN-IMMW){instr[IMMW-1]}}, instr[IMMW-1:0]};
    ctrl.valid_op = 1'b1;
    unique case (opc)
      OP_NOP: ;
      OP_ALU, OP_ALUI: begin
        ctrl.unit     = UNIT_ALU;
        ctrl.use_imm  = (opc == OP_ALUI);
        ctrl.rs1_used = 1'b1;
        ctrl.rs2_used = (opc == OP_ALU);
        ctrl.reg_we   = 1'b1;
      end
      OP_SHF, OP_SHFI: begin
        ctrl.unit     = UNIT_BS;
        ctrl.use_imm  = (opc == OP_SHFI);
        ctrl.rs1_used = 1'b1;
        ctrl.rs2_used = (opc == OP_SHF);
        ctrl.reg_we   = 1'b1;
      end
      OP_ROT, OP_ROTI: begin
        ctrl.unit     = UNIT_UR;
        ctrl.use_imm  = (opc == OP_ROTI);
        ctrl.rs1_used = 1'b1;
        ctrl.rs2_used = (opc == OP_ROT);
        ctrl.reg_we   = 1'b1;
      end
      OP_LD: begin
        ctrl.rs1_used = 1'b1;
        ctrl.reg_we   = 1'b1;
        ctrl.mem_rd   = 1'b1;
      end
      OP_ST: begin
        ctrl.rs1_used = 1'b1;
        ctrl.rs2_used = 1'b1;
        ctrl.mem_wr   = 1'b1;
      end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
        ctrl.rs1_used = 1'b1;
        ctrl.rs2_used = 1'b1;
        ctrl.br = (opc == OP_BEQ) ? BR_EQ :
                  (opc == OP_BNE) ? BR_NE :
                  (opc == OP_BLT) ? BR_LT : BR_GE;
      end
      OP_JMP:  ctrl.br   = BR_JMP;
      OP_HALT: ctrl.halt = 1'b1;
      default: ctrl.valid_op = 1'b0;
    endcase
  end
endmodule
