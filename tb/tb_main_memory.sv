// tb_main_memory: self-checking testbench of the 1024 x 64-bit memory.
//
// Fills all words through the load port, reads them back on both read
// ports, then mixes random data-port writes and reads against a software
// copy, and checks that the load port wins over a simultaneous data write.
module tb_main_memory;
  import risc_pkg::*;

  logic       clk = 1'b0;
  logic [9:0] if_addr, d_addr, ld_addr;
  logic       d_we, ld_en;
  word_t      if_data, d_wdata, d_rdata, ld_data;
  word_t      model [1024];
  int         checks = 0, failures = 0;

  main_memory dut (.clk, .if_addr, .if_data, .d_addr, .d_we, .d_wdata, .d_rdata,
                   .ld_en, .ld_addr, .ld_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    d_we = 0; ld_en = 0; if_addr = 0; d_addr = 0; ld_addr = 0; d_wdata = 0; ld_data = 0;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      ld_en = 1; ld_addr = 10'(i); ld_data = {$urandom, $urandom}; model[i] = ld_data;
      @(negedge clk);
    end
    ld_en = 0;
    for (int i = 0; i < 1024; i++) begin
      if_addr = 10'(i); d_addr = 10'(1023 - i); #1;
      check("if", if_data, model[i]);
      check("d", d_rdata, model[1023 - i]);
    end
    for (int k = 0; k < 3000; k++) begin
      d_we = $urandom_range(0, 1); d_addr = 10'($urandom); d_wdata = {$urandom, $urandom};
      if_addr = (k % 3 == 0) ? d_addr : 10'($urandom);
      #1;
      check("rd", d_rdata, model[d_addr]);
      check("if2", if_data, model[if_addr]);
      @(negedge clk);
      if (d_we) model[d_addr] = d_wdata;
      check("after write", if_data, model[if_addr]);
    end
    d_we = 1; d_addr = 10'd7; d_wdata = 64'd1; ld_en = 1; ld_addr = 10'd7; ld_data = 64'd2;
    @(negedge clk); d_we = 0; ld_en = 0; #1;
    check("load priority", d_rdata, 64'd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
