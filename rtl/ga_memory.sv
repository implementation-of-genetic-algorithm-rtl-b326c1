// ga_memory: the engine's internal shared memory.
//
// One DEPTH x VALW single-port RAM that holds the user-controlled parameters
// and both population banks (see ga_mic for the address map). Writes take
// effect at the clock edge; reads are asynchronous, as in the distributed
// (LUT) RAM of the FPGA the design targets. Only the memory's existence, its
// word width (valw) and address width (addrw) come from the design; the
// single port and the read timing are this design's choices.
module ga_memory #(
  parameter int unsigned ADDRW = 6,
  parameter int unsigned VALW  = 16
) (
  input  logic             clk,
  input  logic             we,
  input  logic [ADDRW-1:0] addr,
  input  logic [VALW-1:0]  wdata,
  output logic [VALW-1:0]  rdata
);

  logic [VALW-1:0] mem [2**ADDRW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
