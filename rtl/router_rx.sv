// router_rx: comparator and Register1 of a router, for one selection address.
//
// Each cycle in which the network transfers, the comparator checks the source address
// of the packet leaving each line multiplexer of the router against the selection
// address. On a match the packet's data is latched into Register1, which holds it for
// the PE until the next match. A packet with a given source address reaches a router on
// only one line, so at most one line matches, except in the PE-router cycle, where both
// multiplexers carry the router's own PE packet (then both carry the same data).
// Comparator and Register1 follow the router structure of the architecture; watching
// both lines with one comparator pair and the enable bit are this design's choices.
module router_rx
  import pdta_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mode_e   mode,
  input  logic    sel_en,    // selection address in use this step
  input  addr_t   sel_addr,  // selection address
  input  packet_t line1_pkt, // multiplexer output on TL1 (left to right)
  input  packet_t line2_pkt, // multiplexer output on TL2 (right to left)
  output word_t   rx_data,   // Register1
  output logic    rx_hit     // Register1 loaded at the last clock edge
);

  logic hit1, hit2;

  always_comb begin
    hit1 = sel_en && (mode != MODE_IDLE) && line1_pkt.valid && (line1_pkt.src == sel_addr);
    hit2 = sel_en && (mode != MODE_IDLE) && line2_pkt.valid && (line2_pkt.src == sel_addr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_data <= '0;
      rx_hit  <= 1'b0;
    end else begin
      rx_hit <= hit1 || hit2;
      if (hit1)      rx_data <= line1_pkt.data;
      else if (hit2) rx_data <= line2_pkt.data;
    end
  end

  // Source addresses are unique, so two lines can only match at once with the same packet.
  a_single_source: assert property (@(posedge clk) disable iff (!rst_n)
    (hit1 && hit2) |-> (line1_pkt.data == line2_pkt.data));

endmodule
