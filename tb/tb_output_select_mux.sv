// tb_output_select_mux: self-checking testbench of the output selection mux.
//
// With three distinct random unit results, checks that each select code
// passes the right one and that UNIT_NONE gives zero.
module tb_output_select_mux;
  import risc_pkg::*;

  unit_e sel;
  word_t alu_res, bs_res, ur_res, y;
  int    checks = 0, failures = 0;

  output_select_mux dut (.sel, .alu_res, .bs_res, .ur_res, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      word_t exp;
      alu_res = {$urandom, $urandom}; bs_res = {$urandom, $urandom}; ur_res = {$urandom, $urandom};
      sel = unit_e'(k % 4);
      #1;
      exp = (k % 4 == 1) ? alu_res : (k % 4 == 2) ? bs_res : (k % 4 == 3) ? ur_res : 64'd0;
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d got=%h exp=%h", k % 4, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
