// control_memory: one module's slice of the VLIW control store, DEPTH words of WIDTH bits.
//
// Written by the host before a run (synchronous write port) and read by the sequencer's
// step counter through an asynchronous read port, so the control word of the current
// step is valid in the same cycle the step counter points at it. Size follows the PE
// feature table (32 bit x 256 words); the read style is this design's choice.
module control_memory #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
