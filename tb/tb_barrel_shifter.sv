// tb_barrel_shifter: self-checking testbench of the barrel shifter rotator.
//
// For each shift/rotate code and every amount 0..63 (on corner and random
// operands) it compares the result, valid once a gated clock edge has
// captured the inputs in the operand registers, with a
// reference that moves the bits one place at a time, `amount` times. Codes
// outside SLL..ROR must give zero. The result must hold while the clock is
// stopped.
module tb_barrel_shifter;
  import risc_pkg::*;

  logic       clk = 1'b0, rst = 1'b0, run_clk = 1'b1, gclk;
  logic [5:0] func, amount;
  word_t      a, result;
  int         checks = 0, failures = 0;

  assign gclk = clk & run_clk;
  barrel_shifter dut (.gclk, .rst, .func_d(func), .a_d(a), .amount_d(amount), .y(result));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_shift(logic [5:0] f, word_t x, int n);
    word_t r = x;
    if (f > 6'd4) return '0;
    repeat (n) begin
      case (f)
        6'd0: r = {r[62:0], 1'b0};
        6'd1: r = {1'b0, r[63:1]};
        6'd2: r = {r[63], r[63:1]};
        6'd3: r = {r[62:0], r[63]};
        6'd4: r = {r[0], r[63:1]};
        default: ;
      endcase
    end
    return r;
  endfunction

  task automatic apply(logic [5:0] f, word_t x, int n);
    word_t exp = ref_shift(f, x, n);
    func = f; a = x; amount = 6'(n);
    @(posedge clk); #1;
    checks++;
    if (result !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL f=%0d a=%h n=%0d got=%h exp=%h", f, x, n, result, exp);
    end
  endtask

  initial begin
    func = 0; a = 0; amount = 0;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    for (int f = 0; f < 7; f++)
      for (int n = 0; n < 64; n++) begin
        apply(6'(f), 64'h8000_0000_0000_0001, n);
        apply(6'(f), 64'hf0e1_d2c3_b4a5_9687, n);
        apply(6'(f), {$urandom, $urandom}, n);
      end
    apply(SH_ROR, 64'h0123_4567_89ab_cdef, 8);
    run_clk = 1'b0;
    func = SH_SLL; amount = 6'd1;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (result !== 64'hef01_2345_6789_abcd) begin failures++; $display("FAIL hold %h", result); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
