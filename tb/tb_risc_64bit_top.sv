// tb_risc_64bit_top: end-to-end testbench of the five-stage core, at the
// core's default sizes (64 registers, 1024-word memory).
//
// Each test loads a program and its data through the load port while reset
// is held, releases reset, and runs until `halted`. An instruction-level
// reference model in this file executes the same program one instruction at
// a time, with no pipeline, and predicts:
//   - all 64 registers and the data half of memory (words 512..1023) at the
//     end, compared through hierarchical references;
//   - the sequence of values on DATA_OUT (one per ALU/shifter/rotator
//     instruction);
//   - how many clock pulses each gated execution unit receives (one per
//     instruction that uses it, none otherwise);
//   - the cycle count: one per instruction, plus one for the HALT and four to
//     drain the pipeline, plus one per load-use stall, plus two per taken
//     branch.
// Programs: a directed one (arithmetic, shifts, byte swap, store/load, a
// counted loop with multiply-accumulate) and random ones with many
// back-to-back dependencies, loads, stores and forward branches.
// It counts how often each pipeline mechanism occurred (load-use stall,
// branch flush, forwarding into Decode from Execute and from Memory,
// register-file write-first bypass, each unit's clock held off,
// multiply-accumulate, a deferred accumulator write committed at the ALU's
// next gated edge, halt) and counts a failure for any that never happened.
// The random programs mix MAC, MSU, ACCWR and ACCRD with the other
// operations, so accumulator reads follow writes at every distance.
module tb_risc_64bit_top;
  import risc_pkg::*;

  localparam int DATA_BASE = 512;

  logic       clk = 1'b0, rst = 1'b0;
  logic       load_en;
  logic [9:0] load_addr, pc;
  word_t      data_input, data_output;
  logic       data_valid, halted;
  int         checks = 0, failures = 0;

  risc_64bit_top dut (.clk, .rst, .load_en, .load_addr, .data_input, .data_output,
                      .data_valid, .halted, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program image ----------------
  word_t image [1024];

  // ---------------- reference model ----------------
  word_t reg_m [64];
  word_t mem_m [1024];
  word_t acc_m;
  word_t dout_q [$];
  int    n_exec, n_stall, n_taken, n_alu, n_bs, n_ur;

  function automatic word_t m_alu(logic [5:0] f, word_t x, word_t y);
    logic [127:0] p;
    case (f)
      6'(ALU_ADD):   return x + y;
      6'(ALU_SUB):   return x - y;
      6'(ALU_AND):   return x & y;
      6'(ALU_OR):    return x | y;
      6'(ALU_XOR):   return x ^ y;
      6'(ALU_SLT):   return word_t'($signed(x) < $signed(y));
      6'(ALU_SLTU):  return word_t'(x < y);
      6'(ALU_MIN):   return ($signed(x) < $signed(y)) ? x : y;
      6'(ALU_MAXU):  return (x > y) ? x : y;
      6'(ALU_PASSB): return y;
      6'(ALU_MUL):   return x * y;
      6'(ALU_MULHU): begin p = {64'd0, x} * {64'd0, y}; return p[127:64]; end
      6'(ALU_MAC):   begin acc_m = acc_m + x * y; return acc_m; end
      6'(ALU_MSU):   begin acc_m = acc_m - x * y; return acc_m; end
      6'(ALU_ACCWR): begin acc_m = x; return x; end
      6'(ALU_ACCRD): return acc_m;
      6'(ALU_ACCCLR): begin acc_m = 0; return 0; end
      default:       begin $display("model: ALU op %0d not modelled", f); return 0; end
    endcase
  endfunction

  function automatic word_t m_shift(logic [5:0] f, word_t x, logic [5:0] n);
    logic [127:0] t;
    case (f)
      6'(SH_SLL): return x << n;
      6'(SH_SRL): return x >> n;
      6'(SH_SRA): return word_t'($signed(x) >>> n);
      6'(SH_ROL): begin t = {x, x} << n; return t[127:64]; end
      6'(SH_ROR): begin t = {x, x} >> n; return t[63:0]; end
      6'(SH_BSWAP): return {x[7:0], x[15:8], x[23:16], x[31:24], x[39:32], x[47:40], x[55:48], x[63:56]};
      6'(SH_SEXTB): return word_t'($signed(x[7:0]));
      6'(SH_SEXTH): return word_t'($signed(x[15:0]));
      6'(SH_ZEXTW): return {32'd0, x[31:0]};
      default: begin $display("model: shift op %0d not modelled", f); return 0; end
    endcase
  endfunction

  function automatic void model_run();
    int        p = 0;
    logic      last_load = 0;
    reg_addr_t last_rd = 0;
    for (int i = 0; i < 64; i++) reg_m[i] = 0;
    for (int i = 0; i < 1024; i++) mem_m[i] = image[i];
    acc_m = 0; dout_q.delete();
    n_exec = 0; n_stall = 0; n_taken = 0; n_alu = 0; n_bs = 0; n_ur = 0;
    for (int step = 0; step < 100000; step++) begin
      word_t     w = mem_m[p];
      logic [5:0] opc = w[63:58], f = w[57:52];
      reg_addr_t rd = w[51:46], s1 = w[45:40], s2 = w[39:34];
      word_t     imm = {{30{w[33]}}, w[33:0]};
      word_t     a = reg_m[s1], b = reg_m[s2], r;
      logic      uses1, uses2, taken = 0;
      if (opc == 6'(OP_HALT)) break;
      uses1 = (opc >= 1 && opc <= 12);
      uses2 = (opc == 1 || opc == 3 || opc == 5 || (opc >= 8 && opc <= 12));
      if (last_load && ((uses1 && s1 == last_rd) || (uses2 && s2 == last_rd))) n_stall++;
      last_load = (opc == 6'(OP_LD));
      last_rd   = rd;
      n_exec++;
      case (opc)
        6'(OP_ALU), 6'(OP_ALUI): begin
          r = m_alu(f, a, (opc == 6'(OP_ALUI)) ? imm : b);
          reg_m[rd] = r; dout_q.push_back(r); n_alu++;
        end
        6'(OP_SHF), 6'(OP_SHFI), 6'(OP_ROT), 6'(OP_ROTI): begin
          r = m_shift(f, a, (opc == 6'(OP_SHFI) || opc == 6'(OP_ROTI)) ? imm[5:0] : b[5:0]);
          reg_m[rd] = r; dout_q.push_back(r);
          if (opc == 6'(OP_SHF) || opc == 6'(OP_SHFI)) n_bs++; else n_ur++;
        end
        6'(OP_LD): reg_m[rd] = mem_m[10'(a + imm)];
        6'(OP_ST): mem_m[10'(a + imm)] = b;
        6'(OP_BEQ): taken = (a == b);
        6'(OP_BNE): taken = (a != b);
        6'(OP_BLT): taken = ($signed(a) < $signed(b));
        6'(OP_BGE): taken = ($signed(a) >= $signed(b));
        6'(OP_JMP): taken = 1;
        default: ;
      endcase
      if (taken) begin
        n_taken++;
        p = int'(10'(p + imm));
      end else p = int'(10'(p + 1));
    end
  endfunction

  // ---------------- mechanism counters ----------------
  int c_stall = 0, c_flush = 0, c_fwd_mem = 0, c_fwd_ex = 0, c_bypass = 0;
  int c_alu_gated = 0, c_bs_gated = 0, c_ur_gated = 0, c_mac = 0, c_halt = 0, c_acc_commit = 0;
  int p_alu = 0, p_bs = 0, p_ur = 0;
  word_t dout_seen [$];

  always @(posedge dut.gclk_alu) if (!rst) p_alu++;
  always @(posedge dut.gclk_bs)  if (!rst) p_bs++;
  always @(posedge dut.gclk_ur)  if (!rst) p_ur++;

  always @(posedge clk) if (!rst) begin
    if (dut.stall) c_stall++;
    if (dut.flush) c_flush++;
    if (dut.fwd_a == FWD_MEM || dut.fwd_b == FWD_MEM) c_fwd_mem++;
    if (dut.fwd_a == FWD_EX || dut.fwd_b == FWD_EX) c_fwd_ex++;
    if (dut.wb_we && ((dut.u_regfile.re1 && dut.u_regfile.raddr1 == dut.mem_wb_rd) ||
                      (dut.u_regfile.re2 && dut.u_regfile.raddr2 == dut.mem_wb_rd))) c_bypass++;
    if (dut.id_advance && !dut.alu_en && (dut.bs_en || dut.ur_en)) c_alu_gated++;
    if (dut.id_advance && !dut.bs_en && dut.alu_en) c_bs_gated++;
    if (dut.id_advance && !dut.ur_en && dut.alu_en) c_ur_gated++;
    if (dut.alu_en && dut.id_ctrl.func == 6'(ALU_MAC)) c_mac++;
    if (dut.alu_en && dut.u_alu.acc_pending) c_acc_commit++;
  end

  always @(posedge clk) if (!rst && data_valid) dout_seen.push_back(data_output);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // Loads the image, runs the core to halt and compares with the model.
  task automatic run_program(string name);
    int cycles = 0;
    model_run();
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      load_en = 1'b1; load_addr = 10'(i); data_input = image[i];
      @(negedge clk);
    end
    load_en = 1'b0;
    p_alu = 0; p_bs = 0; p_ur = 0; dout_seen.delete();
    rst = 1'b0;
    do begin
      @(posedge clk); #1;
      cycles++;
    end while (!halted && cycles < 200000);
    c_halt++;
    check({name, " cycles"}, longint'(cycles), longint'(n_exec) + 5 + longint'(n_stall) + 2 * longint'(n_taken));
    for (int i = 0; i < 64; i++) check($sformatf("%s r%0d", name, i), dut.u_regfile.regs[i], reg_m[i]);
    for (int i = DATA_BASE; i < 1024; i++) check($sformatf("%s mem[%0d]", name, i), dut.u_mem.mem[i], mem_m[i]);
    check({name, " acc"}, dut.u_alu.acc, acc_m);
    check({name, " dout count"}, longint'(dout_seen.size()), longint'(dout_q.size()));
    for (int i = 0; i < dout_q.size() && i < dout_seen.size(); i++)
      check($sformatf("%s dout[%0d]", name, i), dout_seen[i], dout_q[i]);
    check({name, " alu clock pulses"}, longint'(p_alu), longint'(n_alu));
    check({name, " shifter clock pulses"}, longint'(p_bs), longint'(n_bs));
    check({name, " rotator clock pulses"}, longint'(p_ur), longint'(n_ur));
    $display("%s: %0d instructions in %0d cycles (%0d stalls, %0d taken branches)",
             name, n_exec, cycles, n_stall, n_taken);
  endtask

  function automatic void clear_image();
    for (int i = 0; i < DATA_BASE; i++) image[i] = '0;
    for (int i = DATA_BASE; i < 1024; i++) image[i] = {$urandom, $urandom};
  endfunction

  // Directed program: arithmetic, shift, rotate, store/load, loop with MAC.
  function automatic void directed_program();
    int p = 0;
    clear_image();
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_PASSB), 6'd1, 6'd0, 6'd0, 34'sd5);       // r1 = 5
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_PASSB), 6'd2, 6'd0, 6'd0, 34'sd7);       // r2 = 7
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_PASSB), 6'd3, 6'd0, 6'd0, 34'sd512);     // r3 = 512
    image[p++] = mk_instr(OP_ALU,  6'(ALU_ADD),   6'd4, 6'd1, 6'd2, 34'sd0);       // r4 = r1 + r2
    image[p++] = mk_instr(OP_SHFI, 6'(SH_SLL),    6'd5, 6'd4, 6'd0, 34'sd40);      // r5 = r4 << 40
    image[p++] = mk_instr(OP_ROTI, 6'(SH_BSWAP),  6'd6, 6'd5, 6'd0, 34'sd0);       // r6 = bswap r5
    image[p++] = mk_instr(OP_ST,   6'd0,          6'd0, 6'd3, 6'd6, 34'sd100);     // mem[612] = r6
    image[p++] = mk_instr(OP_LD,   6'd0,          6'd7, 6'd3, 6'd0, 34'sd100);     // r7 = mem[612]
    image[p++] = mk_instr(OP_ALU,  6'(ALU_XOR),   6'd8, 6'd7, 6'd5, 34'sd0);       // r8 = r7 ^ r5 (load-use)
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_PASSB), 6'd10, 6'd0, 6'd0, 34'sd8);      // r10 = 8 (count)
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_ACCCLR), 6'd0, 6'd0, 6'd0, 34'sd0);      // acc = 0 (r0 = 0)
    // loop: sum mem[512..519] into r12, acc += element * r1, store shifted copy
    image[p++] = mk_instr(OP_LD,   6'd0,          6'd11, 6'd3, 6'd0, 34'sd0);      // r11 = mem[r3]
    image[p++] = mk_instr(OP_ALU,  6'(ALU_ADD),   6'd12, 6'd12, 6'd11, 34'sd0);    // r12 += r11 (load-use)
    image[p++] = mk_instr(OP_ALU,  6'(ALU_MAC),   6'd13, 6'd11, 6'd1, 34'sd0);     // acc += r11 * r1
    image[p++] = mk_instr(OP_SHF,  6'(SH_ROR),    6'd14, 6'd11, 6'd10, 34'sd0);    // r14 = r11 ror r10
    image[p++] = mk_instr(OP_ROTI, 6'(SH_SEXTH),  6'd15, 6'd14, 6'd0, 34'sd0);     // r15 = sext16 r14
    image[p++] = mk_instr(OP_ST,   6'd0,          6'd0, 6'd3, 6'd15, 34'sd256);    // mem[r3+256] = r15
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_ADD),   6'd3, 6'd3, 6'd0, 34'sd1);       // r3++
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_SUB),   6'd10, 6'd10, 6'd0, 34'sd1);     // r10--
    image[p++] = mk_instr(OP_BNE,  6'd0,          6'd0, 6'd10, 6'd0, -34'sd8);     // loop while r10 != 0
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_ACCRD), 6'd16, 6'd0, 6'd0, 34'sd0);      // r16 = acc
    image[p++] = mk_instr(OP_SHFI, 6'(SH_SRA),    6'd17, 6'd16, 6'd0, 34'sd3);     // r17 = r16 >>> 3
    image[p++] = mk_instr(OP_BLT,  6'd0,          6'd0, 6'd17, 6'd16, 34'sd2);     // skip next if r17 < r16
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_PASSB), 6'd18, 6'd0, 6'd0, 34'sd99);
    image[p++] = mk_instr(OP_ALU,  6'(ALU_MULHU), 6'd19, 6'd16, 6'd12, 34'sd0);    // r19 = hi(r16 * r12)
    image[p++] = mk_instr(OP_JMP,  6'd0,          6'd0, 6'd0, 6'd0, 34'sd2);
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_PASSB), 6'd20, 6'd0, 6'd0, 34'sd1);      // skipped
    image[p++] = mk_instr(OP_HALT, 6'd0,          6'd0, 6'd0, 6'd0, 34'sd0);
  endfunction

  // Random program: dense dependencies among r1..r7, loads and stores
  // relative to r63 = 512, forward branches, ending in HALT.
  function automatic void random_program(int len);
    logic [5:0] alu_ops [15] = '{6'(ALU_ADD), 6'(ALU_SUB), 6'(ALU_AND), 6'(ALU_OR), 6'(ALU_XOR),
                                 6'(ALU_SLT), 6'(ALU_SLTU), 6'(ALU_MIN), 6'(ALU_MAXU), 6'(ALU_MUL),
                                 6'(ALU_MULHU), 6'(ALU_MAC), 6'(ALU_MSU), 6'(ALU_ACCRD), 6'(ALU_ACCWR)};
    logic [5:0] sh_ops [5]   = '{6'(SH_SLL), 6'(SH_SRL), 6'(SH_SRA), 6'(SH_ROL), 6'(SH_ROR)};
    logic [5:0] ur_ops [9]   = '{6'(SH_SLL), 6'(SH_SRL), 6'(SH_SRA), 6'(SH_ROL), 6'(SH_ROR),
                                 6'(SH_BSWAP), 6'(SH_SEXTB), 6'(SH_SEXTH), 6'(SH_ZEXTW)};
    int p = 0;
    clear_image();
    image[p++] = mk_instr(OP_ALUI, 6'(ALU_PASSB), 6'd63, 6'd0, 6'd0, 34'sd512);
    for (int i = 1; i < 8; i++)
      image[p++] = mk_instr(OP_ALUI, 6'(ALU_PASSB), 6'(i), 6'd0, 6'd0, 34'($urandom));
    for (int k = 0; k < len; k++) begin
      reg_addr_t rd = 6'($urandom_range(1, 7)), s1 = 6'($urandom_range(1, 7)), s2 = 6'($urandom_range(1, 7));
      logic [33:0] imm = 34'($urandom);
      case ($urandom_range(0, 9))
        0, 1: image[p++] = mk_instr(OP_ALU, alu_ops[$urandom_range(0, 14)], rd, s1, s2, 34'd0);
        2:    image[p++] = mk_instr(OP_ALUI, alu_ops[$urandom_range(0, 8)], rd, s1, s2, imm);
        3:    image[p++] = mk_instr($urandom_range(0, 1) != 0 ? OP_SHF : OP_SHFI, sh_ops[$urandom_range(0, 4)], rd, s1, s2, imm);
        4:    image[p++] = mk_instr($urandom_range(0, 1) != 0 ? OP_ROT : OP_ROTI, ur_ops[$urandom_range(0, 8)], rd, s1, s2, imm);
        5, 6: image[p++] = mk_instr(OP_LD, 6'd0, rd, 6'd63, s2, 34'($urandom_range(0, 63)));
        7:    image[p++] = mk_instr(OP_ST, 6'd0, rd, 6'd63, s2, 34'($urandom_range(0, 63)));
        8:    image[p++] = mk_instr(opcode_e'($urandom_range(9, 12)), 6'd0, rd, s1, s2, 34'($urandom_range(1, 4)));
        default: image[p++] = mk_instr(OP_ALU, 6'(ALU_XOR), rd, s1, s1 == s2 ? 6'd1 : s2, 34'd0);
      endcase
    end
    // branch landing pad, then halt
    for (int i = 0; i < 4; i++) image[p++] = mk_instr(OP_NOP, 6'd0, 6'd0, 6'd0, 6'd0, 34'd0);
    image[p++] = mk_instr(OP_HALT, 6'd0, 6'd0, 6'd0, 6'd0, 34'd0);
    // pads after HALT would be flushed; keep them as further HALTs
    for (int i = 0; i < 4; i++) image[p++] = mk_instr(OP_HALT, 6'd0, 6'd0, 6'd0, 6'd0, 34'd0);
  endfunction

  initial begin
    load_en = 1'b0; load_addr = '0; data_input = '0;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);

    directed_program();
    run_program("directed");
    check("directed r4", reg_m[4], 64'd12);
    check("directed r6", reg_m[6], 64'h0000_0000_000c_0000);

    for (int t = 0; t < 12; t++) begin
      random_program(300);
      run_program($sformatf("random%0d", t));
    end

    $display("mechanisms: stalls=%0d flushes=%0d fwd_ex=%0d fwd_mem=%0d rf_bypass=%0d",
             c_stall, c_flush, c_fwd_ex, c_fwd_mem, c_bypass);
    $display("            alu_gated=%0d bs_gated=%0d ur_gated=%0d mac=%0d acc_commits=%0d halts=%0d",
             c_alu_gated, c_bs_gated, c_ur_gated, c_mac, c_acc_commit, c_halt);
    check("seen load-use stall", longint'(c_stall > 0), 1);
    check("seen branch flush", longint'(c_flush > 0), 1);
    check("seen forward from Memory", longint'(c_fwd_mem > 0), 1);
    check("seen forward from Execute", longint'(c_fwd_ex > 0), 1);
    check("seen register-file bypass", longint'(c_bypass > 0), 1);
    check("seen ALU clock gated", longint'(c_alu_gated > 0), 1);
    check("seen shifter clock gated", longint'(c_bs_gated > 0), 1);
    check("seen rotator clock gated", longint'(c_ur_gated > 0), 1);
    check("seen multiply-accumulate", longint'(c_mac > 0), 1);
    check("seen deferred accumulator write committed", longint'(c_acc_commit > 0), 1);
    check("seen halt", longint'(c_halt > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
