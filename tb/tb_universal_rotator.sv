// tb_universal_rotator: self-checking testbench of the universal shift
// rotator.
//
// Shifts and rotations are checked for every amount against a reference
// that moves bits one place at a time; byte swap against a byte loop; sign
// and zero extensions against explicit bit fills. Undefined codes must give
// zero, and the result must hold while the clock is stopped.
module tb_universal_rotator;
  import risc_pkg::*;

  logic       clk = 1'b0, rst = 1'b0, run_clk = 1'b1, gclk;
  logic [5:0] func, amount;
  word_t      a, result;
  int         checks = 0, failures = 0;

  assign gclk = clk & run_clk;
  universal_rotator dut (.gclk, .rst, .func_d(func), .a_d(a), .amount_d(amount), .y(result));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_op(logic [5:0] f, word_t x, int n);
    word_t r = x;
    int    w;
    case (f)
      6'd0, 6'd1, 6'd2, 6'd3, 6'd4:
        repeat (n) begin
          case (f)
            6'd0: r = {r[62:0], 1'b0};
            6'd1: r = {1'b0, r[63:1]};
            6'd2: r = {r[63], r[63:1]};
            6'd3: r = {r[62:0], r[63]};
            default: r = {r[0], r[63:1]};
          endcase
        end
      6'd5: for (int i = 0; i < 8; i++)
              for (int j = 0; j < 8; j++) r[8*i + j] = x[8*(7-i) + j];
      6'd6, 6'd7, 6'd8, 6'd9, 6'd10, 6'd11: begin
        w = (f == 6 || f == 9) ? 8 : (f == 7 || f == 10) ? 16 : 32;
        for (int i = 0; i < 64; i++)
          if (i >= w) r[i] = (f <= 6'd8) ? x[w-1] : 1'b0;
      end
      default: r = '0;
    endcase
    return r;
  endfunction

  task automatic apply(logic [5:0] f, word_t x, int n);
    word_t exp = ref_op(f, x, n);
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
    for (int f = 0; f < 14; f++)
      for (int n = 0; n < 64; n++) begin
        apply(6'(f), 64'h8000_0000_0000_0001, n);
        apply(6'(f), 64'h7e6d_5c4b_3a29_1807, n);
        apply(6'(f), 64'h0000_0000_8000_8080, n);
        apply(6'(f), {$urandom, $urandom}, n);
      end
    apply(SH_BSWAP, 64'h0123_4567_89ab_cdef, 0);
    checks++;
    if (result !== 64'hefcd_ab89_6745_2301) begin failures++; $display("FAIL bswap %h", result); end
    run_clk = 1'b0;
    func = SH_SLL; amount = 6'd1;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (result !== 64'hefcd_ab89_6745_2301) begin failures++; $display("FAIL hold %h", result); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
