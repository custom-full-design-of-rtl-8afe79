// tb_alu64: self-checking testbench of the 64-operation ALU.
//
// Runs every one of the 64 operation codes on corner operands and on random
// operands, and compares the result (valid after the gated clock edge that
// captures the inputs in the ALU's operand registers) with a reference computed here from first principles: 128-bit signed and
// unsigned products, bit-by-bit counting, explicit saturation bounds. A
// software copy of the accumulator checks the multiply-accumulate codes,
// first with each code repeated back to back, then in a random mix of all
// codes, which exercises the deferred accumulator write. It also checks that
// the result and accumulator hold while the clock is stopped, as they do when
// the clock gate is closed.
module tb_alu64;
  import risc_pkg::*;

  logic    clk = 1'b0;
  logic    rst = 1'b0;
  logic    gclk;
  assign gclk = clk & run_clk;
  alu_op_e op;
  word_t   a, b, result, acc;
  int      checks = 0, failures = 0;
  logic    run_clk = 1'b1;

  alu64 dut (.gclk(gclk), .rst, .op_d(op), .a_d(a), .b_d(b), .y(result), .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t acc_model;

  function automatic word_t ref_op(alu_op_e o, word_t x, word_t y, inout word_t accm);
    logic signed [127:0] sx, sy, sp;
    logic [127:0] ux, uy, up;
    longint signed s_x, s_y;
    word_t r, lim_hi, lim_lo;
    int n;
    s_x = x; s_y = y;
    sx = {{64{x[63]}}, x}; sy = {{64{y[63]}}, y};
    ux = {64'd0, x};       uy = {64'd0, y};
    lim_hi = 64'h7fff_ffff_ffff_ffff; lim_lo = 64'h8000_0000_0000_0000;
    r = 0;
    case (o)
      ALU_ADD: r = x + y;               ALU_SUB: r = x - y;
      ALU_AND: r = x & y;               ALU_OR:  r = x | y;
      ALU_XOR: r = x ^ y;               ALU_NOR: r = ~(x | y);
      ALU_NAND: r = ~(x & y);           ALU_XNOR: r = ~(x ^ y);
      ALU_ANDN: r = x & ~y;             ALU_ORN: r = x | ~y;
      ALU_NOT: r = ~x;                  ALU_NEG: r = 0 - x;
      ALU_PASSA: r = x;                 ALU_PASSB: r = y;
      ALU_INC: r = x + 1;               ALU_DEC: r = x - 1;
      ALU_SLT: r = (s_x < s_y);         ALU_SLTU: r = (x < y);
      ALU_SEQ: r = (x == y);            ALU_SNE: r = (x != y);
      ALU_SGE: r = (s_x >= s_y);        ALU_SGEU: r = (x >= y);
      ALU_SGT: r = (s_x > s_y);         ALU_SGTU: r = (x > y);
      ALU_MIN: r = (s_x < s_y) ? x : y; ALU_MAX: r = (s_x > s_y) ? x : y;
      ALU_MINU: r = (x < y) ? x : y;    ALU_MAXU: r = (x > y) ? x : y;
      ALU_ABS: r = (s_x < 0) ? -s_x : s_x;
      ALU_ABSDIF: r = (s_x > s_y) ? x - y : y - x;
      ALU_AVGU: begin up = ux + uy; r = up[64:1]; end
      ALU_AVG: begin sp = sx + sy; sp = sp >>> 1; r = sp[63:0]; end
      ALU_MUL: begin up = ux * uy; r = up[63:0]; end
      ALU_MULH: begin sp = sx * sy; r = sp[127:64]; end
      ALU_MULHU: begin up = ux * uy; r = up[127:64]; end
      ALU_MULHSU: begin sp = sx * $signed(uy); r = sp[127:64]; end
      ALU_MAC: begin accm = accm + x * y; r = accm; end
      ALU_MSU: begin accm = accm - x * y; r = accm; end
      ALU_ACCCLR: begin accm = 0; r = 0; end
      ALU_ACCRD: r = accm;
      ALU_ADDW: begin n = int'(x[31:0]) + int'(y[31:0]); r = longint'(n); end
      ALU_SUBW: begin n = int'(x[31:0]) - int'(y[31:0]); r = longint'(n); end
      ALU_MULW: begin n = int'(x[31:0]) * int'(y[31:0]); r = longint'(n); end
      ALU_ADDSS: begin sp = sx + sy;
        r = (sp > $signed({64'd0, lim_hi})) ? lim_hi : (sp < -$signed({64'd0, lim_lo})) ? lim_lo : sp[63:0]; end
      ALU_SUBSS: begin sp = sx - sy;
        r = (sp > $signed({64'd0, lim_hi})) ? lim_hi : (sp < -$signed({64'd0, lim_lo})) ? lim_lo : sp[63:0]; end
      ALU_ADDUS: begin up = ux + uy; r = up[64] ? '1 : up[63:0]; end
      ALU_SUBUS: r = (x < y) ? 0 : x - y;
      ALU_ACCWR: begin accm = x; r = x; end
      ALU_POPC: begin n = 0; for (int i = 0; i < 64; i++) n += x[i]; r = n; end
      ALU_CLZ: begin n = 0; while (n < 64 && !x[63-n]) n++; r = n; end
      ALU_CTZ: begin n = 0; while (n < 64 && !x[n]) n++; r = n; end
      ALU_PARITY: begin n = 0; for (int i = 0; i < 64; i++) n += x[i]; r = n % 2; end
      ALU_CLO: begin n = 0; while (n < 64 && x[63-n]) n++; r = n; end
      ALU_CTO: begin n = 0; while (n < 64 && x[n]) n++; r = n; end
      ALU_SEQZ: r = (x == 0);
      ALU_SIGN: r = (s_x < 0) ? -1 : (s_x > 0) ? 1 : 0;
      ALU_CARRY: begin up = ux + uy; r = up[64]; end
      ALU_BORROW: r = (x < y);
      ALU_OVFADD: begin sp = sx + sy; r = (sp != {{64{sp[63]}}, sp[63:0]}); end
      ALU_OVFSUB: begin sp = sx - sy; r = (sp != {{64{sp[63]}}, sp[63:0]}); end
      ALU_REDOR: r = (x != 0);
      ALU_REDAND: r = (x == '1);
      ALU_CLRLSB: begin r = x; for (int i = 0; i < 64; i++) if (x[i]) begin r[i] = 0; break; end end
      ALU_ISOLSB: begin r = 0; for (int i = 0; i < 64; i++) if (x[i]) begin r[i] = 1; break; end end
      default: r = 0;
    endcase
    return r;
  endfunction

  task automatic apply(alu_op_e o, word_t x, word_t y);
    word_t exp;
    op = o; a = x; b = y;
    exp = ref_op(o, x, y, acc_model);
    @(posedge clk); #1;
    checks++;
    if (result !== exp || acc !== acc_model) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%0d a=%h b=%h got=%h exp=%h acc=%h/%h", o, x, y, result, exp, acc, acc_model);
    end
  endtask

  word_t corners [8] = '{64'd0, 64'd1, '1, 64'h8000_0000_0000_0000, 64'h7fff_ffff_ffff_ffff,
                         64'h0000_0000_8000_0000, 64'h0f0f_0000_ff00_1230, 64'hffff_fffe_0000_0003};

  initial begin
    #1 rst = 1'b1; op = ALU_ADD; a = 0; b = 0; acc_model = 0;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    for (int o = 0; o < 64; o++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) apply(alu_op_e'(o), corners[i], corners[j]);
      for (int k = 0; k < 200; k++)
        apply(alu_op_e'(o), {$urandom, $urandom}, {$urandom, $urandom});
    end
    // Random mix, with accumulator operations frequent.
    for (int k = 0; k < 3000; k++) begin
      logic [5:0] o;
      o = ($urandom_range(0, 2) == 0) ? 6'($urandom_range(36, 39)) : 6'($urandom);
      apply(alu_op_e'(o), {$urandom, $urandom}, {$urandom, $urandom});
    end
    // Hold while the clock is stopped.
    apply(ALU_ACCWR, 64'h1234, 64'd0);
    run_clk = 1'b0;
    op = ALU_ADD; a = 64'd5; b = 64'd6;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (result !== 64'h1234 || acc !== 64'h1234) begin
      failures++;
      $display("FAIL gated clock did not hold: %h %h", result, acc);
    end
    run_clk = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (result !== 64'd11 || acc !== 64'h1234) begin
      failures++;
      $display("FAIL after re-enable %h %h", result, acc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
