// tb_fetch_unit: self-checking testbench of the program counter.
//
// Drives random stall, redirect and halt requests and compares the PC and
// the halted/fetch-valid outputs every cycle with a cycle model of the
// rules: redirect first, then halt, then stall, else increment.
module tb_fetch_unit;
  logic       clk = 1'b0, rst = 1'b0;
  logic       stall, redirect, halt_req;
  logic [9:0] target, pc, pc_m;
  logic       fetch_valid, halted, halted_m;
  int         checks = 0, failures = 0;

  fetch_unit #(.AW(10)) dut (.clk, .rst, .stall, .redirect, .target, .halt_req,
                             .pc, .fetch_valid, .halted);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 0; redirect = 0; halt_req = 0; target = 0;
    #1 rst = 1'b1;
    repeat (2) @(posedge clk); #1 rst = 1'b0;
    pc_m = 0; halted_m = 0;
    for (int k = 0; k < 5000; k++) begin
      stall    = ($urandom_range(0, 3) == 0);
      redirect = ($urandom_range(0, 7) == 0);
      halt_req = ($urandom_range(0, 63) == 0);
      target   = 10'($urandom);
      if (k % 500 == 0) begin  // restart from a halt now and then
        rst = 1; #1 rst = 0; pc_m = 0; halted_m = 0;
      end
      #1;
      checks++;
      if (fetch_valid !== (!halted_m && !halt_req)) begin
        failures++; $display("FAIL fetch_valid k=%0d", k);
      end
      @(posedge clk);
      if (redirect) pc_m = target;
      else begin
        if (!stall && !halted_m && !halt_req) pc_m = pc_m + 1;
        if (halt_req) halted_m = 1;
      end
      #1;
      checks++;
      if (pc !== pc_m || halted !== halted_m) begin
        failures++;
        if (failures < 20) $display("FAIL k=%0d pc=%0d exp=%0d halted=%b exp=%b", k, pc, pc_m, halted, halted_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
