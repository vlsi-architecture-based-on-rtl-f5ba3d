// router: the router of one PE on the double-transmission-line micronetwork.
//
// The router has one router_line on each transmission line (TL1 carries packets left to
// right, TL2 right to left) and N_RX receive registers, each with its own selection
// address and comparator. In the PE-router cycle both lines load the PE's packet, so a
// packet spreads from its source in both directions; in router-router cycles each line
// shifts one router per clock. A packet is received by every router whose selection
// address equals its source address, which gives point-to-point transfer and broadcast
// alike. A receive register is loaded on the clock edge at the end of the cycle in which
// the packet passes the router, so a packet sent at cycle t0 by router s is in Register1
// of router d after cycle t|d-s|.
//
// Ports: pe_pkt from the PE; tl1_in / tl2_out face the left neighbour, tl1_out / tl2_in
// the right neighbour; rx_data / rx_hit go to the PE. Two receive registers (two
// router-to-PE paths) are this design's reading of the processor structure, so that an
// adder or multiplier can collect both operands.
module router
  import pdta_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mode_e   mode,
  input  packet_t pe_pkt,
  input  logic    [N_RX-1:0] sel_en,
  input  addr_t   sel_addr [N_RX],
  input  packet_t tl1_in,    // from router i-1
  output packet_t tl1_out,   // to router i+1
  input  packet_t tl2_in,    // from router i+1
  output packet_t tl2_out,   // to router i-1
  output word_t   rx_data [N_RX],
  output logic    [N_RX-1:0] rx_hit
);

  packet_t mux1, mux2;

  router_line u_tl1 (
    .clk, .rst_n, .mode, .pe_pkt, .up_pkt(tl1_in), .mux_pkt(mux1), .out_pkt(tl1_out)
  );

  router_line u_tl2 (
    .clk, .rst_n, .mode, .pe_pkt, .up_pkt(tl2_in), .mux_pkt(mux2), .out_pkt(tl2_out)
  );

  for (genvar k = 0; k < N_RX; k++) begin : g_rx
    router_rx u_rx (
      .clk, .rst_n, .mode,
      .sel_en(sel_en[k]), .sel_addr(sel_addr[k]),
      .line1_pkt(mux1), .line2_pkt(mux2),
      .rx_data(rx_data[k]), .rx_hit(rx_hit[k])
    );
  end

endmodule
