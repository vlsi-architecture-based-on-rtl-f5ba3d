// router_line: the part of a router that sits on one transmission line.
//
// A multiplexer selects the packet from the neighbouring router upstream on this line
// in router-router mode, and the packet from the router's own PE otherwise. The
// selected packet is offered combinationally to the router's comparators and is
// captured in the pipeline registers (Register2 for the data, Register3 for the source
// address) that drive the next router downstream. One packet moves one router per
// clock cycle. The multiplexer and the two pipeline registers follow the router
// structure of the architecture; the valid bit and the emptying of the registers in
// MODE_IDLE are this design's additions.
module router_line
  import pdta_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mode_e   mode,
  input  packet_t pe_pkt,   // from this router's PE
  input  packet_t up_pkt,   // from the upstream router on this line
  output packet_t mux_pkt,  // multiplexer output, seen by the comparators
  output packet_t out_pkt   // Register3 (source) / Register2 (data), to the downstream router
);

  always_comb mux_pkt = (mode == MODE_RR) ? up_pkt : pe_pkt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_pkt <= '0;
    end else begin
      out_pkt.valid <= (mode != MODE_IDLE) && mux_pkt.valid;
      out_pkt.src   <= mux_pkt.src;
      out_pkt.data  <= mux_pkt.data;
    end
  end

endmodule
