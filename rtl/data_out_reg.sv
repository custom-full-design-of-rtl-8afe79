// data_out_reg: 64-bit Data Out register.
//
// Captures the output of the output selection multiplexer at the rising
// clock edge when `load` is high, and drives the processor's DATA_OUT bus
// from it; otherwise it holds, so DATA_OUT changes only when an execution
// unit has produced a new result. `updated` pulses for one cycle after each
// load. Asynchronous active-high reset clears it. The register and its place
// after the output mux are the document's; the load condition (a valid
// instruction in Execute that used an execution unit) is set by the top level.
module data_out_reg
  import risc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  word_t d,
  output word_t q,
  output logic  updated
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q       <= '0;
      updated <= 1'b0;
    end else begin
      updated <= load;
      if (load) q <= d;
    end
  end
endmodule
