// pipeline_controller: hazard control of the five-stage pipeline.
//
// No state machine: every decision is a combinational function of the
// pipeline registers, evaluated each cycle.
//   Forwarding (in Decode, in front of the ID/EX and unit operand
//   registers): a source register of the instruction in Decode that matches
//   the destination of a register-writing instruction in Execute takes that
//   instruction's result (FWD_EX). Otherwise, if it matches the instruction
//   in Memory, it takes that result or loaded word (FWD_MEM). Otherwise the
//   register-file value stands (FWD_NONE); the register file itself returns
//   a value being written back in the same cycle. The younger match wins.
//   Load-use interlock: a load in Execute has no data yet. If the
//   instruction in Decode reads the load's destination, Fetch and Decode hold
//   for one cycle and a bubble enters Execute (`stall`). The word is then
//   forwarded from Memory.
//   Control hazards: a branch or jump taken in Execute (`branch_taken`)
//   flushes the instructions in Fetch and Decode (`flush`); the flush wins
//   over the stall.
// Interface: register numbers and valid/control bits of the Decode, Execute
// and Memory stages in; forwarding selects, stall and flush out. The
// published design calls for forwarding multiplexers and registered
// interlocks without an FSM. The exact policy is this design's: forwarding
// at the end of Decode, a one-cycle load-use stall, and branches resolved in
// Execute with two flushed slots.
module pipeline_controller
  import risc_pkg::*;
(
  // Decode stage (IF/ID register, decoded)
  input  logic      id_valid,
  input  logic      id_rs1_used,
  input  logic      id_rs2_used,
  input  reg_addr_t id_rs1,
  input  reg_addr_t id_rs2,
  // Execute stage (ID/EX register)
  input  logic      ex_valid,
  input  logic      ex_mem_rd,
  input  logic      ex_reg_we,
  input  reg_addr_t ex_rd,
  input  logic      branch_taken,
  // Memory stage (EX/MEM register)
  input  logic      mem_valid,
  input  logic      mem_reg_we,
  input  reg_addr_t mem_rd,
  // Decisions
  output fwd_e      fwd_a,
  output fwd_e      fwd_b,
  output logic      stall,
  output logic      flush
);
  function automatic fwd_e pick(logic used, reg_addr_t rs,
                                logic e_ok, reg_addr_t e_rd,
                                logic m_ok, reg_addr_t m_rd);
    if (used && e_ok && e_rd == rs) return FWD_EX;
    if (used && m_ok && m_rd == rs) return FWD_MEM;
    return FWD_NONE;
  endfunction

  logic e_ok, m_ok, load_use;

  always_comb begin
    e_ok  = ex_valid && ex_reg_we;
    m_ok  = mem_valid && mem_reg_we;
    fwd_a = pick(id_rs1_used, id_rs1, e_ok, ex_rd, m_ok, mem_rd);
    fwd_b = pick(id_rs2_used, id_rs2, e_ok, ex_rd, m_ok, mem_rd);
    load_use = ex_valid && ex_mem_rd && ex_reg_we && id_valid &&
               ((id_rs1_used && id_rs1 == ex_rd) || (id_rs2_used && id_rs2 == ex_rd));
    flush = branch_taken;
    stall = load_use && !branch_taken;
  end
endmodule
