// universal_rotator: universal shift rotator.
//
// A second shift unit next to the barrel shifter that also covers the data
// rearrangements that would otherwise need the ALU. It is built around one
// right rotator: the operand is rotated right by r = amount (right
// operations) or by 64-amount (left operations), and a mask then decides, bit
// by bit, whether the rotated bit or a fill bit (zero or the sign) is kept.
//   SH_SLL, SH_SRL, SH_SRA, SH_ROL, SH_ROR  shift/rotate by `amount` (0..63)
//   SH_BSWAP                                reverse the order of the 8 bytes
//   SH_SEXTB/H/W                            sign-extend the low 8/16/32 bits
//   SH_ZEXTB/H/W                            zero-extend the low 8/16/32 bits
// Other function codes give 0. `amount` is ignored by the last seven.
//
// Clocking: the operation, operand and amount are captured in the unit's own
// operand registers at a rising edge of its gated clock `gclk` (the edge that
// moves a rotator instruction from Decode into Execute); `y` is then a
// combinational function of them during Execute. While the gate is closed
// nothing inside the unit toggles. Asynchronous active-high reset clears the
// registers. The operation list comes from the published design: logical
// shifts, arithmetic right shift, both rotations, byte swapping and sign
// extension. Zero extension, the codes, the rotate-and-mask structure and
// the gated operand registers are this design's choices.
module universal_rotator
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

  logic [5:0]  r;
  word_t       rot, keep;
  logic        fill;
  logic [2*XLEN-1:0] twice;

  always_comb begin
    unique case (func)
      SH_SLL, SH_ROL: r = 6'd0 - amount;
      default:        r = amount;
    endcase
    twice = {a, a} >> r;
    rot   = twice[XLEN-1:0];
    keep  = '1;
    fill  = 1'b0;
    y     = '0;
    unique case (func)
      SH_SLL:   begin keep = '1 << amount; y = rot & keep; end
      SH_SRL:   begin keep = '1 >> amount; y = rot & keep; end
      SH_SRA:   begin
                  keep = '1 >> amount;
                  fill = a[XLEN-1];
                  y    = (rot & keep) | ({XLEN{fill}} & ~keep);
                end
      SH_ROL, SH_ROR: y = rot;
      SH_BSWAP: for (int i = 0; i < XLEN / 8; i++) y[8*i +: 8] = a[XLEN - 8 - 8*i +: 8];
      SH_SEXTB: y = {{(XLEN-8){a[7]}},   a[7:0]};
      SH_SEXTH: y = {{(XLEN-16){a[15]}}, a[15:0]};
      SH_SEXTW: y = {{(XLEN-32){a[31]}}, a[31:0]};
      SH_ZEXTB: y = {{(XLEN-8){1'b0}},   a[7:0]};
      SH_ZEXTH: y = {{(XLEN-16){1'b0}},  a[15:0]};
      SH_ZEXTW: y = {{(XLEN-32){1'b0}},  a[31:0]};
      default:  y = '0;
    endcase
  end
endmodule
