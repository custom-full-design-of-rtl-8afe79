// barrel_shifter: 64-bit barrel shifter rotator.
//
// Shifts or rotates a 64-bit operand by 0..63 places in one pass through six
// multiplexer stages; stage k moves the word by 2^k places when bit k of the
// amount is set, so every amount takes the same time. The stages always move
// right; for the left operations (SLL, ROL) the operand is bit-reversed
// before the stages and the result reversed after them. The bits entering
// at the top of a stage are the bits leaving at the bottom (rotate), the
// sign bit (SRA) or zero (SLL, SRL).
//   func: SH_SLL, SH_SRL, SH_SRA, SH_ROL, SH_ROR (risc_pkg); other codes give 0.
//
// Clocking: the operation, operand and amount are captured in the unit's own
// operand registers at a rising edge of its gated clock `gclk` (the edge
// that moves a shift instruction from Decode into Execute); `y` is then a
// combinational function of these registers during Execute. While the gate
// is closed the registers hold and nothing inside the shifter toggles.
// Asynchronous active-high reset clears the registers.
// Single-cycle completion regardless of the amount and the clock gate come
// from the published design; the reverse-around-a-right-shifter structure and
// the gated operand registers are this design's.
module barrel_shifter
  import risc_pkg::*;
(
  input  logic       gclk,
  input  logic       rst,
  input  logic [5:0] func_d,
  input  word_t      a_d,
  input  logic [5:0] amount_d,
  output word_t      y
);
  logic [5:0] func, amount;
  word_t      a;

  // Operand registers on the gated clock.
  always_ff @(posedge gclk or posedge rst) begin
    if (rst) begin
      func   <= '0;
      a      <= '0;
      amount <= '0;
    end else begin
      func   <= func_d;
      a      <= a_d;
      amount <= amount_d;
    end
  end

  word_t stage [7];
  logic  left, rotate, fill;

  function automatic word_t bit_reverse(word_t v);
    word_t r;
    for (int i = 0; i < XLEN; i++) r[i] = v[XLEN-1-i];
    return r;
  endfunction

  always_comb begin
    left   = (func == SH_SLL) || (func == SH_ROL);
    rotate = (func == SH_ROL) || (func == SH_ROR);
    fill   = (func == SH_SRA) && a[XLEN-1];
    stage[0] = left ? bit_reverse(a) : a;
    for (int k = 0; k < 6; k++) begin
      stage[k+1] = stage[k];
      if (amount[k]) begin
        for (int i = 0; i < XLEN; i++) begin
          if (i + (1 << k) < XLEN) stage[k+1][i] = stage[k][i + (1 << k)];
          else                     stage[k+1][i] = rotate ? stage[k][i + (1 << k) - XLEN] : fill;
        end
      end
    end
    y = left ? bit_reverse(stage[6]) : stage[6];
    if (func > SH_ROR) y = '0;
  end
endmodule
