// tb_data_out_reg: self-checking testbench of the Data Out register.
//
// Checks reset to zero, loading on `load`, holding otherwise, and the
// one-cycle `updated` pulse after each load, against a cycle model.
module tb_data_out_reg;
  import risc_pkg::*;

  logic  clk = 1'b0, rst = 1'b0, load, updated;
  word_t d, q, q_m;
  logic  upd_m;
  int    checks = 0, failures = 0;

  data_out_reg dut (.clk, .rst, .load, .d, .q, .updated);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; d = 0;
    #1 rst = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (q !== 0 || updated !== 0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0; q_m = 0;
    for (int k = 0; k < 3000; k++) begin
      load = $urandom_range(0, 2) == 0; d = {$urandom, $urandom};
      @(posedge clk);
      upd_m = load;
      if (load) q_m = d;
      #1;
      checks++;
      if (q !== q_m || updated !== upd_m) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d q=%h exp=%h upd=%b exp=%b", k, q, q_m, updated, upd_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
