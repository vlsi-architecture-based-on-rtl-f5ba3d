// pdta_processor: parallel VLSI processor built on the packet-data-transfer micronetwork.
//
// N_PE modules, each a PE (adder, multiplier, local memory), its router and its slice of
// the VLIW control memory, sit on one micronetwork. The scheduling and allocation of
// the algorithm are fixed in advance, so no arbitration exists anywhere: the VLIW program
// states, for every step, which source address each router's receive registers select,
// which PEs send, what each PE does, and how many clock cycles the transfer takes
// (the distance of the farthest transfer plus one). vliw_sequencer runs the steps.
//
// Host port (use only while busy is low): host_target selects a PE's local memory, a
// PE's control memory, or the step-length memory; host_pe picks the PE, host_addr the
// word. host_we writes host_wdata; host_re reads a local-memory word, which appears on
// host_rdata on the next cycle. start runs the program from step 0; done pulses when it
// has ended. PE i has source address i.
module pdta_processor
  import pdta_pkg::*;
#(
  parameter int unsigned N_PE = N_PE_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  input  host_target_e          host_target,
  input  logic [ADDR_W-1:0]     host_pe,
  input  logic [MEM_AW-1:0]     host_addr,
  input  logic                  host_we,
  input  logic                  host_re,
  input  word_t                 host_wdata,
  output word_t                 host_rdata
);

  mode_e             mode;
  logic              exec;
  logic [PC_W-1:0]   pc;

  packet_t           pe_pkt   [N_PE];
  logic [N_RX-1:0]   sel_en   [N_PE];
  addr_t             sel_addr [N_PE][N_RX];
  word_t             rx_data  [N_PE][N_RX];
  logic [N_RX-1:0]   rx_hit   [N_PE];
  word_t             pe_rdata [N_PE];
  logic [ADDR_W-1:0] rd_pe_q;

  vliw_sequencer #(.DEPTH(CTRL_DEPTH)) u_seq (
    .clk, .rst_n, .start,
    .len_we(host_we && !busy && host_target == HOST_STEP),
    .len_waddr(host_addr), .len_wdata(host_wdata[STEP_LEN_W-1:0]),
    .mode, .exec, .pc, .busy, .done
  );

  for (genvar i = 0; i < N_PE; i++) begin : g_mod
    logic       [CTRL_W-1:0] ctrl_raw;
    ctrl_word_t              ctrl;
    logic                    sel_here;

    assign sel_here = !busy && (host_pe == ADDR_W'(i));

    control_memory #(.WIDTH(CTRL_W), .DEPTH(CTRL_DEPTH)) u_ctrl (
      .clk, .we(sel_here && host_we && host_target == HOST_CTRL),
      .waddr(host_addr), .wdata(host_wdata), .raddr(pc), .rdata(ctrl_raw)
    );
    assign ctrl = ctrl_word_t'(ctrl_raw);

    pe #(.MY_ADDR(i)) u_pe (
      .clk, .rst_n, .exec, .ctrl, .rx_data(rx_data[i]), .tx_pkt(pe_pkt[i]),
      .host_en(!busy),
      .host_we(sel_here && host_we && host_target == HOST_LOCAL),
      .host_re(sel_here && host_re && host_target == HOST_LOCAL),
      .host_addr, .host_wdata, .host_rdata(pe_rdata[i])
    );

    assign sel_en[i]      = {ctrl.sel1_en, ctrl.sel0_en};
    assign sel_addr[i][0] = ctrl.sel0;
    assign sel_addr[i][1] = ctrl.sel1;
  end

  micronetwork #(.N_PE(N_PE)) u_net (
    .clk, .rst_n, .mode, .pe_pkt, .sel_en, .sel_addr, .rx_data, .rx_hit
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_pe_q <= '0;
    else if (host_re) rd_pe_q <= host_pe;
  end

  assign host_rdata = (int'(rd_pe_q) < N_PE) ? pe_rdata[rd_pe_q] : '0;

endmodule
