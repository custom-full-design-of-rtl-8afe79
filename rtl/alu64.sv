// alu64: the 64-operation arithmetic and logic unit.
//
// Computes one of 64 operations (alu_op_e in risc_pkg) on two 64-bit
// operands: add and subtract (also 32-bit "W" forms, saturating forms and
// carry/borrow/overflow flags), bitwise logic, comparisons returning 0 or 1,
// minimum/maximum, absolute value and averages, multiplication (low half,
// signed/unsigned high halves, 32-bit form), bit counting and reductions,
// and multiply-accumulate on an internal 64-bit accumulator.
//
// Clocking: the ALU's own state is clocked by its gated clock `gclk`, which
// pulses once for each ALU instruction, at the edge that moves it from Decode
// into Execute. At that edge the operation code and both operands are
// captured in the ALU's operand registers (op_d, a_d, b_d come from the
// Decode stage, after forwarding). During Execute, `y` is a combinational
// function of these registers. While the clock gate is closed the operand
// registers hold, so no node inside the ALU changes.
//
// Accumulator: an accumulator operation (MAC, MSU, ACCCLR, ACCWR) computes
// its new accumulator value during Execute, but the accumulator register is
// only written at the ALU's next clock pulse, because the unit has no clock
// edge of its own at the end of Execute. The operand registers still hold
// that operation then, so the value is the same. The next ALU instruction
// therefore sees it, and the `acc` output always shows the up-to-date value:
// the pending one while a write waits.
//   MAC: acc += a*b, y = new acc     MSU: acc -= a*b, y = new acc
//   ACCCLR: acc = 0, y = 0           ACCRD: y = acc     ACCWR: acc = a, y = a
// Asynchronous active-high reset clears all registers; the operand
// registers then hold ADD 0,0 marked as not yet valid.
//
// The following come from the published design: the 64 operations
// including comparison and multiply-accumulate, the multiplication done by
// the ALU itself, and the gated clock that freezes the whole unit when it is
// not needed. This design chose the operation list and its codes, and
// placed the gated registers at the unit inputs.
module alu64
  import risc_pkg::*;
(
  input  logic    gclk,
  input  logic    rst,
  input  alu_op_e op_d,
  input  word_t   a_d,
  input  word_t   b_d,
  output word_t   y,
  output word_t   acc
);
  alu_op_e            op;
  word_t              a, b, acc_q, acc_next;
  logic               valid_q;
  logic [XLEN:0]      sum, dif;
  logic [2*XLEN-1:0]  prod_ss, prod_uu, prod_su;
  logic               lt_s, lt_u, ovf_add, ovf_sub, acc_pending;
  logic [31:0]        w_add, w_sub, w_mul;

  // Count of leading zeros / trailing zeros / ones of a 64-bit word.
  function automatic word_t count_lz(word_t v);
    word_t n = '0;
    logic  found = 1'b0;
    for (int i = XLEN - 1; i >= 0; i--) begin
      found |= v[i];
      if (!found) n += 64'd1;
    end
    return n;
  endfunction

  function automatic word_t count_tz(word_t v);
    word_t n = word_t'(XLEN);
    for (int i = 0; i < XLEN; i++)
      if (v[i]) begin
        n = word_t'(i);
        break;
      end
    return n;
  endfunction

  function automatic word_t count_ones(word_t v);
    word_t n = '0;
    for (int i = 0; i < XLEN; i++) n += word_t'(v[i]);
    return n;
  endfunction

  // Operand registers on the gated clock.
  always_ff @(posedge gclk or posedge rst) begin
    if (rst) begin
      op      <= ALU_ADD;
      a       <= '0;
      b       <= '0;
      valid_q <= 1'b0;
      acc_q   <= '0;
    end else begin
      if (acc_pending) acc_q <= acc_next;
      op      <= op_d;
      a       <= a_d;
      b       <= b_d;
      valid_q <= 1'b1;
    end
  end

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b};
    dif     = {1'b0, a} - {1'b0, b};
    prod_ss = $signed({{XLEN{a[XLEN-1]}}, a}) * $signed({{XLEN{b[XLEN-1]}}, b});
    prod_uu = {{XLEN{1'b0}}, a} * {{XLEN{1'b0}}, b};
    prod_su = {{XLEN{a[XLEN-1]}}, a} * {{XLEN{1'b0}}, b};
    lt_s    = $signed(a) < $signed(b);
    lt_u    = a < b;
    ovf_add = (a[XLEN-1] == b[XLEN-1]) && (sum[XLEN-1] != a[XLEN-1]);
    ovf_sub = (a[XLEN-1] != b[XLEN-1]) && (dif[XLEN-1] != a[XLEN-1]);
    w_add   = a[31:0] + b[31:0];
    w_sub   = a[31:0] - b[31:0];
    w_mul   = a[31:0] * b[31:0];

    acc_next = acc_q;
    y        = '0;
    unique case (op)
      ALU_ADD:    y = sum[XLEN-1:0];
      ALU_SUB:    y = dif[XLEN-1:0];
      ALU_AND:    y = a & b;
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_NOR:    y = ~(a | b);
      ALU_NAND:   y = ~(a & b);
      ALU_XNOR:   y = ~(a ^ b);
      ALU_ANDN:   y = a & ~b;
      ALU_ORN:    y = a | ~b;
      ALU_NOT:    y = ~a;
      ALU_NEG:    y = -a;
      ALU_PASSA:  y = a;
      ALU_PASSB:  y = b;
      ALU_INC:    y = a + 1'b1;
      ALU_DEC:    y = a - 1'b1;
      ALU_SLT:    y = word_t'(lt_s);
      ALU_SLTU:   y = word_t'(lt_u);
      ALU_SEQ:    y = word_t'(a == b);
      ALU_SNE:    y = word_t'(a != b);
      ALU_SGE:    y = word_t'(!lt_s);
      ALU_SGEU:   y = word_t'(!lt_u);
      ALU_SGT:    y = word_t'(!lt_s && a != b);
      ALU_SGTU:   y = word_t'(!lt_u && a != b);
      ALU_MIN:    y = lt_s ? a : b;
      ALU_MAX:    y = lt_s ? b : a;
      ALU_MINU:   y = lt_u ? a : b;
      ALU_MAXU:   y = lt_u ? b : a;
      ALU_ABS:    y = a[XLEN-1] ? -a : a;
      ALU_ABSDIF: y = lt_s ? (b - a) : dif[XLEN-1:0];
      ALU_AVGU:   y = sum[XLEN:1];
      ALU_AVG:    y = {sum[XLEN-1] ^ ovf_add, sum[XLEN-1:1]};
      ALU_MUL:    y = prod_uu[XLEN-1:0];
      ALU_MULH:   y = prod_ss[2*XLEN-1:XLEN];
      ALU_MULHU:  y = prod_uu[2*XLEN-1:XLEN];
      ALU_MULHSU: y = prod_su[2*XLEN-1:XLEN];
      ALU_MAC: begin
        acc_next = acc_q + prod_uu[XLEN-1:0];
        y        = acc_next;
      end
      ALU_MSU: begin
        acc_next = acc_q - prod_uu[XLEN-1:0];
        y        = acc_next;
      end
      ALU_ACCCLR: acc_next = '0;
      ALU_ACCRD:  y = acc_q;
      ALU_ADDW:   y = {{32{w_add[31]}}, w_add};
      ALU_SUBW:   y = {{32{w_sub[31]}}, w_sub};
      ALU_MULW:   y = {{32{w_mul[31]}}, w_mul};
      ALU_ADDSS:  y = !ovf_add ? sum[XLEN-1:0] :
                      a[XLEN-1] ? {1'b1, {(XLEN-1){1'b0}}} : {1'b0, {(XLEN-1){1'b1}}};
      ALU_SUBSS:  y = !ovf_sub ? dif[XLEN-1:0] :
                      a[XLEN-1] ? {1'b1, {(XLEN-1){1'b0}}} : {1'b0, {(XLEN-1){1'b1}}};
      ALU_ADDUS:  y = sum[XLEN] ? '1 : sum[XLEN-1:0];
      ALU_SUBUS:  y = dif[XLEN] ? '0 : dif[XLEN-1:0];
      ALU_ACCWR: begin
        acc_next = a;
        y        = a;
      end
      ALU_POPC:   y = count_ones(a);
      ALU_CLZ:    y = count_lz(a);
      ALU_CTZ:    y = count_tz(a);
      ALU_PARITY: y = word_t'(^a);
      ALU_CLO:    y = count_lz(~a);
      ALU_CTO:    y = count_tz(~a);
      ALU_SEQZ:   y = word_t'(a == '0);
      ALU_SIGN:   y = a[XLEN-1] ? '1 : (a == '0) ? '0 : word_t'(1);
      ALU_CARRY:  y = word_t'(sum[XLEN]);
      ALU_BORROW: y = word_t'(dif[XLEN]);
      ALU_OVFADD: y = word_t'(ovf_add);
      ALU_OVFSUB: y = word_t'(ovf_sub);
      ALU_REDOR:  y = word_t'(|a);
      ALU_REDAND: y = word_t'(&a);
      ALU_CLRLSB: y = a & (a - 1'b1);
      ALU_ISOLSB: y = a & (-a);
      default:    y = '0;
    endcase
    acc_pending = valid_q && writes_acc(op);
    acc         = acc_pending ? acc_next : acc_q;
  end
endmodule
