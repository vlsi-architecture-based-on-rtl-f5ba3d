// micronetwork: N_PE routers chained on two bit-parallel transmission lines.
//
// TL1 runs from router 0 to router N_PE-1, TL2 back. The line inputs at the two ends
// carry no packet. With the network driven by one MODE_PE cycle followed by
// MODE_RR cycles, every packet reaches every router within N_PE cycles in total
// (one injection cycle plus at most N_PE-1 shifts), without collisions, because each
// line register is written by exactly one source per cycle. Router i's PE has source
// address i (addresses count from 0 here).
//
// Ports are per-router arrays: pe_pkt in, selection addresses in, receive registers out.
module micronetwork
  import pdta_pkg::*;
#(
  parameter int unsigned N_PE = N_PE_DEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mode_e   mode,
  input  packet_t pe_pkt   [N_PE],
  input  logic    [N_RX-1:0] sel_en [N_PE],
  input  addr_t   sel_addr [N_PE][N_RX],
  output word_t   rx_data  [N_PE][N_RX],
  output logic    [N_RX-1:0] rx_hit [N_PE]
);

  // tl1[i] enters router i from the left; tl2[i] enters router i-1 from the right.
  packet_t tl1 [N_PE+1];
  packet_t tl2 [N_PE+1];

  assign tl1[0]    = '0;
  assign tl2[N_PE] = '0;

  for (genvar i = 0; i < N_PE; i++) begin : g_r
    router u_router (
      .clk, .rst_n, .mode,
      .pe_pkt(pe_pkt[i]),
      .sel_en(sel_en[i]), .sel_addr(sel_addr[i]),
      .tl1_in(tl1[i]),    .tl1_out(tl1[i+1]),
      .tl2_in(tl2[i+1]),  .tl2_out(tl2[i]),
      .rx_data(rx_data[i]), .rx_hit(rx_hit[i])
    );
  end

endmodule
