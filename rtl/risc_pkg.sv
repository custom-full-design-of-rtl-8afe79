// risc_pkg: shared constants and types of the 64-bit five-stage RISC core.
//
// The word width (64), the number of general-purpose registers (64, so 6-bit
// register addresses), the 1024-word memory (10-bit word addresses) and the
// 64 ALU operations (6-bit function code) are the sizes the design is built
// around. The instruction encoding below is this design's own: the core is
// specified by its blocks and widths, not by an instruction set, so a simple
// fixed 64-bit format was chosen.
//
// Instruction word (64 bits):
//   [63:58] opcode   instruction class, see opcode_e
//   [57:52] func     ALU operation (alu_op_e) or shift operation (shf_op_e)
//   [51:46] rd       destination register
//   [45:40] rs1      first source register
//   [39:34] rs2      second source register (store data, compare operand)
//   [33:0]  imm      signed immediate, sign-extended to 64 bits
//
// Addresses (PC, load/store) count 64-bit words. Branch and jump targets are
// PC-relative: target = pc + imm of the branch instruction.
package risc_pkg;

  localparam int unsigned XLEN      = 64;
  localparam int unsigned NREGS     = 64;
  localparam int unsigned RAW       = 6;     // register address width
  localparam int unsigned MEM_WORDS = 1024;
  localparam int unsigned MAW       = 10;    // memory word address width
  localparam int unsigned IMMW      = 34;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  reg_addr_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,   // no operation
    OP_ALU  = 6'd1,   // rd = alu(func, rs1, rs2)
    OP_ALUI = 6'd2,   // rd = alu(func, rs1, imm)
    OP_SHF  = 6'd3,   // rd = barrel(func, rs1, rs2[5:0])
    OP_SHFI = 6'd4,   // rd = barrel(func, rs1, imm[5:0])
    OP_ROT  = 6'd5,   // rd = universal(func, rs1, rs2[5:0])
    OP_ROTI = 6'd6,   // rd = universal(func, rs1, imm[5:0])
    OP_LD   = 6'd7,   // rd = mem[rs1 + imm]
    OP_ST   = 6'd8,   // mem[rs1 + imm] = rs2
    OP_BEQ  = 6'd9,   // if (rs1 == rs2) pc = pc + imm
    OP_BNE  = 6'd10,  // if (rs1 != rs2) pc = pc + imm
    OP_BLT  = 6'd11,  // if (rs1 <  rs2, signed) pc = pc + imm
    OP_BGE  = 6'd12,  // if (rs1 >= rs2, signed) pc = pc + imm
    OP_JMP  = 6'd13,  // pc = pc + imm
    OP_HALT = 6'd63   // stop fetching
  } opcode_e;

  // Execution unit that produces an instruction's result.
  typedef enum logic [1:0] {
    UNIT_NONE = 2'd0,
    UNIT_ALU  = 2'd1,
    UNIT_BS   = 2'd2,   // barrel shifter rotator
    UNIT_UR   = 2'd3    // universal shift rotator
  } unit_e;

  typedef enum logic [2:0] {
    BR_NONE = 3'd0,
    BR_EQ   = 3'd1,
    BR_NE   = 3'd2,
    BR_LT   = 3'd3,
    BR_GE   = 3'd4,
    BR_JMP  = 3'd5
  } branch_e;

  // The 64 ALU operations.
  typedef enum logic [5:0] {
    ALU_ADD    = 6'd0,  ALU_SUB    = 6'd1,  ALU_AND    = 6'd2,  ALU_OR     = 6'd3,
    ALU_XOR    = 6'd4,  ALU_NOR    = 6'd5,  ALU_NAND   = 6'd6,  ALU_XNOR   = 6'd7,
    ALU_ANDN   = 6'd8,  ALU_ORN    = 6'd9,  ALU_NOT    = 6'd10, ALU_NEG    = 6'd11,
    ALU_PASSA  = 6'd12, ALU_PASSB  = 6'd13, ALU_INC    = 6'd14, ALU_DEC    = 6'd15,
    ALU_SLT    = 6'd16, ALU_SLTU   = 6'd17, ALU_SEQ    = 6'd18, ALU_SNE    = 6'd19,
    ALU_SGE    = 6'd20, ALU_SGEU   = 6'd21, ALU_SGT    = 6'd22, ALU_SGTU   = 6'd23,
    ALU_MIN    = 6'd24, ALU_MAX    = 6'd25, ALU_MINU   = 6'd26, ALU_MAXU   = 6'd27,
    ALU_ABS    = 6'd28, ALU_ABSDIF = 6'd29, ALU_AVGU   = 6'd30, ALU_AVG    = 6'd31,
    ALU_MUL    = 6'd32, ALU_MULH   = 6'd33, ALU_MULHU  = 6'd34, ALU_MULHSU = 6'd35,
    ALU_MAC    = 6'd36, ALU_MSU    = 6'd37, ALU_ACCCLR = 6'd38, ALU_ACCRD  = 6'd39,
    ALU_ADDW   = 6'd40, ALU_SUBW   = 6'd41, ALU_MULW   = 6'd42, ALU_ADDSS  = 6'd43,
    ALU_SUBSS  = 6'd44, ALU_ADDUS  = 6'd45, ALU_SUBUS  = 6'd46, ALU_ACCWR  = 6'd47,
    ALU_POPC   = 6'd48, ALU_CLZ    = 6'd49, ALU_CTZ    = 6'd50, ALU_PARITY = 6'd51,
    ALU_CLO    = 6'd52, ALU_CTO    = 6'd53, ALU_SEQZ   = 6'd54, ALU_SIGN   = 6'd55,
    ALU_CARRY  = 6'd56, ALU_BORROW = 6'd57, ALU_OVFADD = 6'd58, ALU_OVFSUB = 6'd59,
    ALU_REDOR  = 6'd60, ALU_REDAND = 6'd61, ALU_CLRLSB = 6'd62, ALU_ISOLSB = 6'd63
  } alu_op_e;

  // Shift/rotate operations. The barrel shifter implements SLL..ROR; the
  // universal shift rotator implements all of them.
  typedef enum logic [5:0] {
    SH_SLL   = 6'd0,
    SH_SRL   = 6'd1,
    SH_SRA   = 6'd2,
    SH_ROL   = 6'd3,
    SH_ROR   = 6'd4,
    SH_BSWAP = 6'd5,   // reverse the eight bytes
    SH_SEXTB = 6'd6,   // sign-extend bits [7:0]
    SH_SEXTH = 6'd7,   // sign-extend bits [15:0]
    SH_SEXTW = 6'd8,   // sign-extend bits [31:0]
    SH_ZEXTB = 6'd9,
    SH_ZEXTH = 6'd10,
    SH_ZEXTW = 6'd11
  } shf_op_e;

  // Decoded control of one instruction.
  typedef struct packed {
    logic      valid_op;   // a known opcode
    unit_e     unit;
    logic [5:0] func;
    logic      use_imm;    // unit operand B is the immediate
    logic      rs1_used;
    logic      rs2_used;
    logic      reg_we;
    logic      mem_rd;
    logic      mem_wr;
    branch_e   br;
    logic      halt;
    reg_addr_t rd;
    reg_addr_t rs1;
    reg_addr_t rs2;
    word_t     imm;
  } ctrl_t;

  // Forwarding source of a Decode-stage operand, chosen before it is written
  // into the ID/EX registers and the execution units' operand registers.
  typedef enum logic [1:0] {
    FWD_NONE = 2'd0,   // value read from the register file (which already
                       // returns a same-cycle Write-Back value)
    FWD_EX   = 2'd1,   // result of the instruction now in Execute
    FWD_MEM  = 2'd2    // result or loaded word of the instruction now in Memory
  } fwd_e;

  // ALU operations that write the accumulator.
  function automatic logic writes_acc(logic [5:0] f);
    return f == ALU_MAC || f == ALU_MSU || f == ALU_ACCCLR || f == ALU_ACCWR;
  endfunction

  // Builds an instruction word; used by testbenches to write programs.
  function automatic word_t mk_instr(opcode_e op, logic [5:0] func, reg_addr_t rd,
                                     reg_addr_t rs1, reg_addr_t rs2,
                                     logic [IMMW-1:0] imm);
    return {op, func, rd, rs1, rs2, imm};
  endfunction

endpackage
