// tb_icg_cell: self-checking testbench of the clock gating cell.
//
// Changes the enable at random times in both clock phases, including
// several times during a high phase, and checks that the gated clock is low
// whenever the clock is low, and that during each high phase it equals the
// enable as it stood at that phase's rising edge (no glitches, no cut
// pulses). Also checks that test_en forces the clock through, and counts
// the gated pulses against the expected number.
module tb_icg_cell;
  logic clk = 1'b0, en = 1'b0, test_en = 1'b0, gclk;
  logic en_at_rise;
  int   checks = 0, failures = 0, pulses = 0, exp_pulses = 0;

  icg_cell dut (.clk, .en, .test_en, .gclk);

  always @(posedge gclk) pulses++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t got=%b exp=%b", what, $time, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 2000; k++) begin
      // low phase: 10 time units, enable changes somewhere inside it
      clk = 1'b0;
      test_en = (k % 97 == 0);
      #3;
      en = $urandom_range(0, 1);
      #1 check("low phase", gclk, 1'b0);
      #6;
      en_at_rise = en | test_en;
      if (en_at_rise) exp_pulses++;
      clk = 1'b1;
      #2 check("high start", gclk, en_at_rise);
      en = ~en;                 // disturb the enable during the high phase
      #3 check("high mid", gclk, en_at_rise);
      en = $urandom_range(0, 1);
      #3 check("high late", gclk, en_at_rise);
      #2;
    end
    checks++;
    if (pulses != exp_pulses) begin
      failures++; $display("FAIL pulses %0d exp %0d", pulses, exp_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
