// tb_pipeline_controller: self-checking testbench of the hazard control.
//
// Drives random register numbers and valid/control bits for the Decode,
// Execute and Memory stages (small register numbers so that matches are
// common) and checks forwarding selects, load-use stall and flush against
// the rules: Execute before Memory, only from register-writing valid
// instructions and only for operands the Decode instruction uses; stall
// only for a valid load in Execute whose destination a valid Decode
// instruction reads; a taken branch flushes and cancels the stall. Directed
// cases cover the priority rule, and counters make sure every outcome
// occurred.
module tb_pipeline_controller;
  import risc_pkg::*;

  logic      id_valid, id_rs1_used, id_rs2_used, ex_valid, ex_mem_rd, ex_reg_we;
  logic      branch_taken, mem_valid, mem_reg_we;
  reg_addr_t id_rs1, id_rs2, ex_rd, mem_rd;
  fwd_e      fwd_a, fwd_b;
  logic      stall, flush;
  int        checks = 0, failures = 0;
  int        n_stall = 0, n_fwd_ex = 0, n_fwd_mem = 0, n_flush = 0;

  pipeline_controller dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fwd_e exp_fwd(logic used, reg_addr_t rs);
    if (!used) return FWD_NONE;
    if (ex_valid && ex_reg_we && ex_rd == rs) return FWD_EX;
    if (mem_valid && mem_reg_we && mem_rd == rs) return FWD_MEM;
    return FWD_NONE;
  endfunction

  initial begin
    for (int k = 0; k < 20000; k++) begin
      logic lu, es, ef;
      fwd_e ea, eb;
      {id_valid, id_rs1_used, id_rs2_used, ex_valid, ex_mem_rd, ex_reg_we} = 6'($urandom);
      {mem_valid, mem_reg_we} = 2'($urandom);
      branch_taken = ($urandom_range(0, 5) == 0);
      id_rs1 = 6'($urandom_range(0, 3)); id_rs2 = 6'($urandom_range(0, 3));
      ex_rd  = 6'($urandom_range(0, 3)); mem_rd = 6'($urandom_range(0, 3));
      #1;
      ea = exp_fwd(id_rs1_used, id_rs1);
      eb = exp_fwd(id_rs2_used, id_rs2);
      lu = ex_valid && ex_mem_rd && ex_reg_we && id_valid &&
           ((id_rs1_used && id_rs1 == ex_rd) || (id_rs2_used && id_rs2 == ex_rd));
      es = lu && !branch_taken;
      ef = branch_taken;
      checks++;
      if (fwd_a !== ea || fwd_b !== eb || stall !== es || flush !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d fwd %0d/%0d exp %0d/%0d stall %b/%b flush %b/%b",
                                    k, fwd_a, fwd_b, ea, eb, stall, es, flush, ef);
      end
      if (es) n_stall++;
      if (ef) n_flush++;
      if (eb == FWD_EX) n_fwd_ex++;
      if (ea == FWD_MEM) n_fwd_mem++;
    end
    // Directed: both later stages match, Execute (the younger one) wins.
    {id_valid, branch_taken, ex_mem_rd} = 3'b100;
    {id_rs1_used, id_rs2_used} = 2'b11; id_rs1 = 6'd9; id_rs2 = 6'd10;
    {ex_valid, ex_reg_we, ex_rd} = {2'b11, 6'd9};
    {mem_valid, mem_reg_we, mem_rd} = {2'b11, 6'd9};
    #1 checks++;
    if (fwd_a !== FWD_EX || fwd_b !== FWD_NONE || stall) begin failures++; $display("FAIL priority"); end
    // Same, but Execute holds a load: stall, and no stale forwarding from Memory.
    ex_mem_rd = 1'b1;
    #1 checks++;
    if (!stall || flush) begin failures++; $display("FAIL load-use"); end
    checks++;
    if (n_stall == 0 || n_flush == 0 || n_fwd_mem == 0 || n_fwd_ex == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d %0d", n_stall, n_flush, n_fwd_mem, n_fwd_ex);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
