// register_file: 64-entry, 64-bit general-purpose register file.
//
// Two read ports and one write port. Reads are combinational: a read port
// whose enable is low outputs zero, so its 64-bit bus does not follow the
// address when the decoded instruction does not use that operand. A read of
// the register being written in the same cycle returns the new value (write
// first), so the Write-Back stage and the Decode stage can share a cycle
// without a hazard. Writes happen at the rising clock edge when `we` is
// high. Reset (asynchronous, active high) clears all registers.
// Size and port count follow the document; read-port gating to zero, the
// write-first bypass and reset-to-zero are this design's choices. All
// registers, including register 0, are ordinary registers.
module register_file
  import risc_pkg::*;
#(
  parameter int unsigned N  = NREGS,
  parameter int unsigned W  = XLEN,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          re1,
  input  logic [AW-1:0] raddr1,
  output logic [W-1:0]  rdata1,
  input  logic          re2,
  input  logic [AW-1:0] raddr2,
  output logic [W-1:0]  rdata2,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);
  logic [W-1:0] regs [N];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata1 = '0;
    rdata2 = '0;
    if (re1) rdata1 = (we && waddr == raddr1) ? wdata : regs[raddr1];
    if (re2) rdata2 = (we && waddr == raddr2) ? wdata : regs[raddr2];
  end
endmodule
