// risc_64bit_top: 64-bit scalar RISC core with a five-stage in-order pipeline
// and clock-gated execution units.
//
// Stages and pipeline registers:
//   Fetch      PC (fetch_unit) reads the instruction word from main_memory.
//   IF/ID      if_id_instr, if_id_pc, if_id_valid
//   Decode     decoder; register_file read (read enables from the decoder);
//              pipeline_controller picks forwarded operands and checks the
//              load-use hazard; icg_control opens the clock gate of the one
//              execution unit the instruction needs.
//   ID/EX      id_ex_ctrl, id_ex_pc, id_ex_opA, id_ex_opB, id_ex_valid, and
//              inside the enabled unit its gated operand registers. All are
//              written at the same edge.
//   Execute    the enabled unit (ALU, barrel shifter rotator or universal
//              shift rotator) computes from its operand registers;
//              output_select_mux picks its result (ex_result); an address
//              adder forms rs1+imm for loads and stores; branches are
//              compared and resolved; data_out_reg captures ex_result.
//   EX/MEM     ex_mem_ctrl, ex_mem_result, ex_mem_addr, ex_mem_opB (store
//              data), ex_mem_valid
//   Memory     the data port of main_memory is read or written.
//   MEM/WB     mem_wb_data, mem_wb_rd, mem_wb_we, mem_wb_valid
//   Write-Back register_file write.
// Hazards: results are forwarded into Decode from Execute and Memory, so
// that the ID/EX and unit operand registers receive up-to-date values. A
// Write-Back value reaches Decode through the write-first register file. A
// load followed by a user of its result stalls Fetch/Decode for one cycle. A
// taken branch (decided in Execute) flushes the two younger instructions.
//
// Ports: clk; rst (asynchronous, active high); load_en/load_addr/data_input
// write words into memory (hold rst high while loading a program);
// data_output is the Data Out register, with data_valid pulsing after each
// update; halted goes high once a HALT instruction has been decoded and every
// older instruction has left the pipeline; pc is the fetch address.
//
// From the published design: the block structure, the widths, the 64 x 64
// register file, the 1024-word memory, the output multiplexer feeding the
// Data Out register, and the clock gating of ALU and shifters with enables
// from the decoder. This design's own choices: the instruction encoding, the
// forwarding/stall/flush policy, word addressing, the load port and the HALT
// instruction.
module risc_64bit_top
  import risc_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           load_en,
  input  logic [MAW-1:0] load_addr,
  input  word_t          data_input,
  output word_t          data_output,
  output logic           data_valid,
  output logic           halted,
  output logic [MAW-1:0] pc
);
  // ---------------- Fetch ----------------
  word_t          if_instr;
  logic           fetch_valid, fetch_halted;
  logic           stall, flush, branch_taken, halt_req;
  logic [MAW-1:0] branch_target;

  fetch_unit #(.AW(MAW)) u_fetch (
    .clk, .rst, .stall, .redirect(branch_taken), .target(branch_target),
    .halt_req, .pc, .fetch_valid, .halted(fetch_halted)
  );

  // ---------------- IF/ID ----------------
  word_t          if_id_instr;
  logic [MAW-1:0] if_id_pc;
  logic           if_id_valid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      if_id_instr <= '0;
      if_id_pc    <= '0;
      if_id_valid <= 1'b0;
    end else if (flush) begin
      if_id_valid <= 1'b0;
    end else if (!stall) begin
      if_id_instr <= if_instr;
      if_id_pc    <= pc;
      if_id_valid <= fetch_valid;
    end
  end

  // ---------------- Decode ----------------
  ctrl_t id_ctrl;
  word_t rf_data1, rf_data2;
  logic  wb_we;
  reg_addr_t mem_wb_rd;
  word_t mem_wb_data;

  decoder u_decoder (.instr(if_id_instr), .ctrl(id_ctrl));

  assign halt_req = if_id_valid && id_ctrl.halt && !flush;

  register_file u_regfile (
    .clk, .rst,
    .re1(if_id_valid && id_ctrl.rs1_used), .raddr1(id_ctrl.rs1), .rdata1(rf_data1),
    .re2(if_id_valid && id_ctrl.rs2_used), .raddr2(id_ctrl.rs2), .rdata2(rf_data2),
    .we(wb_we), .waddr(mem_wb_rd), .wdata(mem_wb_data)
  );

  // ---------------- Hazards and Decode-stage forwarding ----------------
  ctrl_t          id_ex_ctrl;
  logic           id_ex_valid;
  ctrl_t          ex_mem_ctrl;
  logic           ex_mem_valid;
  logic           mem_wb_valid, mem_wb_we;
  word_t          ex_result, ex_mem_result, mem_value;
  fwd_e           fwd_a, fwd_b;
  word_t          id_a, id_b, unit_b;
  logic           id_advance;

  pipeline_controller u_ctrl (
    .id_valid(if_id_valid), .id_rs1_used(id_ctrl.rs1_used), .id_rs2_used(id_ctrl.rs2_used),
    .id_rs1(id_ctrl.rs1), .id_rs2(id_ctrl.rs2),
    .ex_valid(id_ex_valid), .ex_mem_rd(id_ex_ctrl.mem_rd), .ex_reg_we(id_ex_ctrl.reg_we),
    .ex_rd(id_ex_ctrl.rd), .branch_taken,
    .mem_valid(ex_mem_valid), .mem_reg_we(ex_mem_ctrl.reg_we), .mem_rd(ex_mem_ctrl.rd),
    .fwd_a, .fwd_b, .stall, .flush
  );

  always_comb begin
    unique case (fwd_a)
      FWD_EX:  id_a = ex_result;
      FWD_MEM: id_a = mem_value;
      default: id_a = rf_data1;
    endcase
    unique case (fwd_b)
      FWD_EX:  id_b = ex_result;
      FWD_MEM: id_b = mem_value;
      default: id_b = rf_data2;
    endcase
    unit_b     = id_ctrl.use_imm ? id_ctrl.imm : id_b;
    id_advance = if_id_valid && !flush && !stall;
  end

  // ---------------- Clock gating of the execution units ----------------
  logic alu_en, bs_en, ur_en;
  logic gclk_alu, gclk_bs, gclk_ur;

  icg_control u_icg_ctrl (
    .id_valid(if_id_valid), .id_unit(id_ctrl.unit), .stall, .flush,
    .alu_en, .bs_en, .ur_en
  );
  icg_cell u_icg_alu (.clk, .en(alu_en), .test_en(1'b0), .gclk(gclk_alu));
  icg_cell u_icg_bs  (.clk, .en(bs_en),  .test_en(1'b0), .gclk(gclk_bs));
  icg_cell u_icg_ur  (.clk, .en(ur_en),  .test_en(1'b0), .gclk(gclk_ur));

  // Each unit captures its operands from Decode at its gated edge.
  word_t alu_out, alu_acc, barrel_out, rotate_out;

  alu64 u_alu (
    .gclk(gclk_alu), .rst, .op_d(alu_op_e'(id_ctrl.func)), .a_d(id_a), .b_d(unit_b),
    .y(alu_out), .acc(alu_acc)
  );
  barrel_shifter u_barrel (
    .gclk(gclk_bs), .rst, .func_d(id_ctrl.func), .a_d(id_a), .amount_d(unit_b[5:0]),
    .y(barrel_out)
  );
  universal_rotator u_rotator (
    .gclk(gclk_ur), .rst, .func_d(id_ctrl.func), .a_d(id_a), .amount_d(unit_b[5:0]),
    .y(rotate_out)
  );

  // ---------------- ID/EX ----------------
  logic [MAW-1:0] id_ex_pc;
  word_t          id_ex_opA, id_ex_opB;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      id_ex_ctrl  <= '0;
      id_ex_pc    <= '0;
      id_ex_opA   <= '0;
      id_ex_opB   <= '0;
      id_ex_valid <= 1'b0;
    end else begin
      id_ex_valid <= id_advance;
      if (id_advance) begin
        id_ex_ctrl <= id_ctrl;
        id_ex_pc   <= if_id_pc;
        id_ex_opA  <= id_a;
        id_ex_opB  <= id_b;
      end
    end
  end

  // ---------------- Execute ----------------
  word_t ex_addr;
  logic  br_cond;

  output_select_mux u_outmux (
    .sel(id_ex_ctrl.unit), .alu_res(alu_out), .bs_res(barrel_out), .ur_res(rotate_out),
    .y(ex_result)
  );

  always_comb begin
    ex_addr = id_ex_opA + id_ex_ctrl.imm;
    unique case (id_ex_ctrl.br)
      BR_EQ:   br_cond = (id_ex_opA == id_ex_opB);
      BR_NE:   br_cond = (id_ex_opA != id_ex_opB);
      BR_LT:   br_cond = ($signed(id_ex_opA) <  $signed(id_ex_opB));
      BR_GE:   br_cond = ($signed(id_ex_opA) >= $signed(id_ex_opB));
      BR_JMP:  br_cond = 1'b1;
      default: br_cond = 1'b0;
    endcase
    branch_taken  = id_ex_valid && br_cond;
    branch_target = id_ex_pc + id_ex_ctrl.imm[MAW-1:0];
  end

  data_out_reg u_dout (
    .clk, .rst, .load(id_ex_valid && id_ex_ctrl.unit != UNIT_NONE), .d(ex_result),
    .q(data_output), .updated(data_valid)
  );

  // ---------------- EX/MEM ----------------
  logic [MAW-1:0] ex_mem_addr;
  word_t          ex_mem_opB;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ex_mem_ctrl   <= '0;
      ex_mem_result <= '0;
      ex_mem_addr   <= '0;
      ex_mem_opB    <= '0;
      ex_mem_valid  <= 1'b0;
    end else begin
      ex_mem_valid <= id_ex_valid;
      if (id_ex_valid) begin
        ex_mem_ctrl   <= id_ex_ctrl;
        ex_mem_result <= ex_result;
        ex_mem_addr   <= ex_addr[MAW-1:0];
        ex_mem_opB    <= id_ex_opB;
      end
    end
  end

  // ---------------- Memory ----------------
  word_t load_data;

  main_memory u_mem (
    .clk,
    .if_addr(pc), .if_data(if_instr),
    .d_addr(ex_mem_addr), .d_we(ex_mem_valid && ex_mem_ctrl.mem_wr), .d_wdata(ex_mem_opB),
    .d_rdata(load_data),
    .ld_en(load_en), .ld_addr(load_addr), .ld_data(data_input)
  );

  assign mem_value = ex_mem_ctrl.mem_rd ? load_data : ex_mem_result;

  // ---------------- MEM/WB ----------------
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mem_wb_data  <= '0;
      mem_wb_rd    <= '0;
      mem_wb_we    <= 1'b0;
      mem_wb_valid <= 1'b0;
    end else begin
      mem_wb_valid <= ex_mem_valid;
      mem_wb_we    <= ex_mem_valid && ex_mem_ctrl.reg_we;
      if (ex_mem_valid) begin
        mem_wb_rd   <= ex_mem_ctrl.rd;
        mem_wb_data <= mem_value;
      end
    end
  end

  // ---------------- Write-Back ----------------
  assign wb_we  = mem_wb_valid && mem_wb_we;
  assign halted = fetch_halted && !if_id_valid && !id_ex_valid && !ex_mem_valid && !mem_wb_valid;

  // Only one execution unit clock may be open at a time.
  a_one_unit_clock: assert property (@(posedge clk) disable iff (rst) $onehot0({alu_en, bs_en, ur_en}));
  // Stall and flush never both act on a stage.
  a_stall_flush: assert property (@(posedge clk) disable iff (rst) !(stall && flush));
endmodule
