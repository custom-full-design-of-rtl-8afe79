// fetch_unit: program counter of the Fetch stage.
//
// Holds the word address of the next instruction to fetch. Each cycle the PC
// moves to pc+1, unless
//   - a branch or jump resolved taken in Execute redirects it to `target`
//     (this wins over everything else, since the stalled or halting
//     instructions behind the branch are being flushed), or
//   - the pipeline controller stalls Fetch (load-use interlock), or
//   - a halt instruction has been decoded: `halt_req` sets a sticky flag and
//     the PC stops. A halt that is flushed by a taken branch in the same
//     cycle is ignored.
// `fetch_valid` says the word read at `pc` this cycle is a real instruction
// (low once halted). Reset (asynchronous, active high) starts at address 0.
// Incrementing, stalling and redirecting are what the document's Fetch stage
// and pipeline controller imply; the halt mechanism is this design's own so
// that a program can end.
module fetch_unit
  import risc_pkg::*;
#(
  parameter int unsigned AW = MAW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          stall,
  input  logic          redirect,
  input  logic [AW-1:0] target,
  input  logic          halt_req,
  output logic [AW-1:0] pc,
  output logic          fetch_valid,
  output logic          halted
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pc     <= '0;
      halted <= 1'b0;
    end else if (redirect) begin
      pc <= target;
    end else begin
      if (halt_req) halted <= 1'b1;
      if (!stall && !halted && !halt_req) pc <= pc + 1'b1;
    end
  end

  assign fetch_valid = !halted && !halt_req;
endmodule
