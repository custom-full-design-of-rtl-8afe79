// tb_register_file: self-checking testbench of the 64 x 64-bit register file.
//
// Checks reset to zero, writes to every register followed by reads on both
// ports, random write/read traffic against a software copy, the same-cycle
// write-first bypass, and that a disabled read port outputs zero.
module tb_register_file;
  import risc_pkg::*;

  logic       clk = 1'b0, rst = 1'b0;
  logic       re1, re2, we;
  logic [5:0] raddr1, raddr2, waddr;
  word_t      rdata1, rdata2, wdata;
  word_t      model [64];
  int         checks = 0, failures = 0;

  register_file dut (.clk, .rst, .re1, .raddr1, .rdata1, .re2, .raddr2, .rdata2,
                     .we, .waddr, .wdata);

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
    re1 = 1; re2 = 1; we = 0; raddr1 = 0; raddr2 = 0; waddr = 0; wdata = 0;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 64; i++) begin
      raddr1 = 6'(i); raddr2 = 6'(63 - i); #1;
      check("reset1", rdata1, 0);
      check("reset2", rdata2, 0);
      model[i] = 0;
    end
    for (int i = 0; i < 64; i++) begin
      we = 1; waddr = 6'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr1 = 6'(i); raddr2 = 6'(i ^ 21); #1;
      check("read1", rdata1, model[i]);
      check("read2", rdata2, model[i ^ 21]);
    end
    for (int k = 0; k < 2000; k++) begin
      we = $urandom_range(0, 1); waddr = 6'($urandom); wdata = {$urandom, $urandom};
      raddr1 = 6'($urandom); raddr2 = (k % 4 == 0) ? waddr : 6'($urandom);
      re1 = ($urandom_range(0, 3) != 0); re2 = ($urandom_range(0, 3) != 0);
      #1;
      check("rnd1", rdata1, !re1 ? 0 : (we && waddr == raddr1) ? wdata : model[raddr1]);
      check("rnd2", rdata2, !re2 ? 0 : (we && waddr == raddr2) ? wdata : model[raddr2]);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
