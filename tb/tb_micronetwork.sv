// tb_micronetwork: runs transfer phases (one MODE_PE cycle, then MODE_RR cycles) on the
// full 32-router network and on a 4-router network.
//  * 32 routers: in each round every PE sends a random word; each router's two receive
//    registers select random sources. Every receive register must hold its source's word
//    after 1+|d-s| transfer cycles at the latest, and its hit must fire exactly in
//    transfer cycle |d-s| (counting the PE-router cycle as 0). The whole exchange must be
//    complete after N cycles, and one round uses distance N-1 (router 0 selects router 31).
//  * 4 routers: the two parallel broadcasts of the architecture's example, selection
//    addresses 3,1,1,3 (numbered from 1), sources 1 and 3 sending: PE2 and PE4 receive
//    after cycle t1, PE1 and PE3 after cycle t2.
module tb_micronetwork;
  import pdta_pkg::*;
  localparam int unsigned N = N_PE_DEF;
  localparam int unsigned NS = 4;

  logic clk = 0, rst_n = 0;
  mode_e mode;
  packet_t pe_pkt [N];
  logic [N_RX-1:0] sel_en [N];
  addr_t sel_addr [N][N_RX];
  word_t rx_data [N][N_RX];
  logic [N_RX-1:0] rx_hit [N];

  packet_t s_pe_pkt [NS];
  logic [N_RX-1:0] s_sel_en [NS];
  addr_t s_sel_addr [NS][N_RX];
  word_t s_rx_data [NS][N_RX];
  logic [N_RX-1:0] s_rx_hit [NS];

  int checks = 0, failures = 0;
  int n_broadcast = 0, n_worst = 0, n_left = 0, n_right = 0;

  micronetwork dut (.clk, .rst_n, .mode, .pe_pkt, .sel_en, .sel_addr, .rx_data, .rx_hit);
  micronetwork #(.N_PE(NS)) dut4 (.clk, .rst_n, .mode, .pe_pkt(s_pe_pkt), .sel_en(s_sel_en),
                                  .sel_addr(s_sel_addr), .rx_data(s_rx_data), .rx_hit(s_rx_hit));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absdiff(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  task automatic big_round(input bit worst);
    word_t data [N];
    int    src  [N][N_RX];
    int    hit_cycle [N][N_RX];
    int    users [N];
    for (int i = 0; i < N; i++) begin
      users[i] = 0;
      data[i] = $urandom;
      pe_pkt[i] = '{valid: 1'b1, src: addr_t'(i), data: data[i]};
    end
    for (int i = 0; i < N; i++) for (int k = 0; k < N_RX; k++) begin
      src[i][k] = $urandom_range(0, N - 1);
      if (worst && k == 0) src[i][k] = N - 1 - i;
      sel_addr[i][k] = addr_t'(src[i][k]);
      hit_cycle[i][k] = -1;
      users[src[i][k]]++;
    end
    for (int i = 0; i < N; i++) sel_en[i] = '1;
    for (int t = 0; t < N; t++) begin
      mode = (t == 0) ? MODE_PE : MODE_RR;
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) for (int k = 0; k < N_RX; k++)
        if (rx_hit[i][k]) begin
          if (hit_cycle[i][k] != -1 && src[i][k] != i) begin
            failures++; $display("FAIL router %0d reg %0d hit twice", i, k);
          end
          if (hit_cycle[i][k] == -1) hit_cycle[i][k] = t;
        end
    end
    mode = MODE_IDLE;
    for (int i = 0; i < N; i++) for (int k = 0; k < N_RX; k++) begin
      checks++;
      if (rx_data[i][k] !== data[src[i][k]] || hit_cycle[i][k] != absdiff(i, src[i][k])) begin
        failures++;
        $display("FAIL router %0d reg %0d src %0d: data %h want %h, hit at t%0d want t%0d", i, k,
                 src[i][k], rx_data[i][k], data[src[i][k]], hit_cycle[i][k], absdiff(i, src[i][k]));
      end else begin
        if (absdiff(i, src[i][k]) == N - 1) n_worst++;
        if (src[i][k] < i) n_left++;
        if (src[i][k] > i) n_right++;
      end
    end
    for (int s = 0; s < N; s++) if (users[s] > 1) n_broadcast++;
    @(posedge clk); #1;
  endtask

  initial begin
    mode = MODE_IDLE;
    for (int i = 0; i < N; i++) begin pe_pkt[i] = '0; sel_en[i] = '0; sel_addr[i] = '{default: '0}; end
    for (int i = 0; i < NS; i++) begin s_pe_pkt[i] = '0; s_sel_en[i] = '0; s_sel_addr[i] = '{default: '0}; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    big_round(1'b1);
    for (int r = 0; r < 20; r++) big_round(1'b0);

    // Parallel broadcast on 4 routers (0-based source addresses 0 and 2).
    begin
      word_t d1, d3;
      int sel [NS] = '{2, 0, 0, 2};
      int arrive [NS] = '{2, 1, 2, 1};
      d1 = 32'h0000_0d01; d3 = 32'h0000_0d03;
      s_pe_pkt[0] = '{valid: 1'b1, src: 5'd0, data: d1};
      s_pe_pkt[2] = '{valid: 1'b1, src: 5'd2, data: d3};
      for (int i = 0; i < NS; i++) begin
        s_sel_en[i] = 2'b01; s_sel_addr[i][0] = addr_t'(sel[i]);
      end
      for (int t = 0; t < 3; t++) begin
        mode = (t == 0) ? MODE_PE : MODE_RR;
        @(posedge clk); #1;
        for (int i = 0; i < NS; i++) begin
          checks++;
          if (s_rx_hit[i][0] !== (t == arrive[i])) begin
            failures++; $display("FAIL broadcast PE%0d hit=%b at t%0d", i + 1, s_rx_hit[i][0], t);
          end
        end
      end
      mode = MODE_IDLE;
      for (int i = 0; i < NS; i++) begin
        checks++;
        if (s_rx_data[i][0] !== (sel[i] == 0 ? d1 : d3)) begin
          failures++; $display("FAIL broadcast PE%0d got %h", i + 1, s_rx_data[i][0]);
        end
      end
    end

    checks++;
    if (n_broadcast == 0 || n_worst == 0 || n_left == 0 || n_right == 0) begin
      failures++;
      $display("FAIL mechanisms broadcast=%0d worst=%0d fromleft=%0d fromright=%0d",
               n_broadcast, n_worst, n_left, n_right);
    end
    $display("mechanisms: broadcast=%0d worst-distance=%0d via-TL1=%0d via-TL2=%0d",
             n_broadcast, n_worst, n_left, n_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
