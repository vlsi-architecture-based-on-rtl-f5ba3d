// local_memory: a PE's local data memory, DEPTH words of WIDTH bits.
//
// Single port, synchronous: on a clock edge with we set, wdata is written at addr; with
// re set, the word at addr (its value before any write of the same edge) is loaded into
// rdata, which otherwise holds. Size follows the PE feature table (32 bit x 256 words);
// the port style is this design's choice. Contents are not reset.
module local_memory #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic             re,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
