// main_memory: 1024 x 64-bit program and data memory.
//
// One word array serves both the Fetch stage and the Memory stage:
//   - instruction port: asynchronous read of word `if_addr`;
//   - data port: asynchronous read of word `d_addr`, synchronous write of
//     `d_wdata` when `d_we` is high;
//   - load port: synchronous write of `ld_data` to `ld_addr` when `ld_en` is
//     high, used to place a program and its data before the core runs. It
//     has priority over the data port.
// A write is seen by reads in the cycle after the clock edge. The array is
// not reset. The 1024-word size matches the memory the design is shown with;
// one shared array, asynchronous reads and the load port are this design's
// choices. Built from flip-flops, as a 64-entry register file and this array
// together account for almost all of the design's state.
module main_memory
  import risc_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] if_addr,
  output word_t         if_data,
  input  logic [AW-1:0] d_addr,
  input  logic          d_we,
  input  word_t         d_wdata,
  output word_t         d_rdata,
  input  logic          ld_en,
  input  logic [AW-1:0] ld_addr,
  input  word_t         ld_data
);
  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_en)     mem[ld_addr] <= ld_data;
    else if (d_we) mem[d_addr]  <= d_wdata;
  end

  assign if_data = mem[if_addr];
  assign d_rdata = mem[d_addr];
endmodule
