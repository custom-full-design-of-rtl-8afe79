// tb_decoder: self-checking testbench of the instruction decoder.
//
// For all 64 opcode values with random other fields, compares every field of
// the decoded control bundle with a table of the expected unit, operand use,
// register write, memory access, branch kind and halt, and checks the field
// extraction and the sign extension of the immediate.
module tb_decoder;
  import risc_pkg::*;

  word_t instr;
  ctrl_t ctrl;
  int    checks = 0, failures = 0;

  decoder dut (.instr, .ctrl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s instr=%h got=%h exp=%h", what, instr, got, exp);
    end
  endtask

  initial begin
    for (int op = 0; op < 64; op++) begin
      for (int k = 0; k < 20; k++) begin
        logic  known, imm_u, r1, r2, we, mr, mw, halt;
        unit_e u;
        branch_e br;
        logic [33:0] imm;
        instr = {6'(op), $urandom, $urandom} ;
        instr[63:58] = 6'(op);
        imm = instr[33:0];
        #1;
        known = (op <= 13) || (op == 63);
        u     = (op == 1 || op == 2) ? UNIT_ALU : (op == 3 || op == 4) ? UNIT_BS :
                (op == 5 || op == 6) ? UNIT_UR : UNIT_NONE;
        imm_u = (op == 2 || op == 4 || op == 6);
        r1    = (op >= 1 && op <= 12);
        r2    = (op == 1 || op == 3 || op == 5 || (op >= 8 && op <= 12));
        we    = (op >= 1 && op <= 7);
        mr    = (op == 7);
        mw    = (op == 8);
        br    = (op == 9) ? BR_EQ : (op == 10) ? BR_NE : (op == 11) ? BR_LT :
                (op == 12) ? BR_GE : (op == 13) ? BR_JMP : BR_NONE;
        halt  = (op == 63);
        check("valid_op", ctrl.valid_op, known);
        check("unit", ctrl.unit, u);
        check("use_imm", ctrl.use_imm, imm_u);
        check("rs1_used", ctrl.rs1_used, r1);
        check("rs2_used", ctrl.rs2_used, r2);
        check("reg_we", ctrl.reg_we, we);
        check("mem_rd", ctrl.mem_rd, mr);
        check("mem_wr", ctrl.mem_wr, mw);
        check("br", ctrl.br, br);
        check("halt", ctrl.halt, halt);
        check("func", ctrl.func, instr[57:52]);
        check("rd", ctrl.rd, instr[51:46]);
        check("rs1", ctrl.rs1, instr[45:40]);
        check("rs2", ctrl.rs2, instr[39:34]);
        check("imm", ctrl.imm, longint'($signed(imm)));
      end
    end
    instr = mk_instr(OP_ALUI, 6'(ALU_ADD), 6'd5, 6'd6, 6'd0, -34'sd3); #1;
    check("imm neg", ctrl.imm, -64'sd3);
    check("rd5", ctrl.rd, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
