// icg_cell: integrated clock gating cell.
//
// A latch that is transparent while clk is low captures the enable, and the
// gated clock is clk AND the latched enable. Because the latch is closed
// while clk is high, a change of `en` during the high phase cannot cut or
// create a clock pulse: gclk either carries a whole pulse of clk or stays
// low. `en` must be stable before the rising edge of clk it is meant to
// pass or block; the gate then decides for that whole high phase.
//
// Ports: clk (free-running clock), en (enable from the clock-gating control),
// test_en (forces the clock on, as in a standard-cell ICG), gclk (output).
// The latch-plus-AND structure is the usual one for an ICG standard cell; the
// document places such cells in front of the execution units but does not
// draw their insides. The latch is intended.
module icg_cell (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);
  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en | test_en;
  end

  assign gclk = clk & en_latched;
endmodule
