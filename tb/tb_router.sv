// tb_router: drives one router with random modes, PE packets, neighbour packets and
// selection addresses, and checks the two line outputs and both receive registers
// against a cycle model of the router written here: in MODE_PE both lines load the PE
// packet, in MODE_RR each line passes its upstream packet on, in MODE_IDLE the lines
// empty; a receive register loads the data of a valid packet whose source equals its
// enabled selection address. Directed cases cover self-receive, reception from each
// line and a disabled selection.
module tb_router;
  import pdta_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode;
  packet_t pe_pkt, tl1_in, tl2_in, tl1_out, tl2_out;
  logic [N_RX-1:0] sel_en, rx_hit;
  addr_t sel_addr [N_RX];
  word_t rx_data [N_RX];
  int checks = 0, failures = 0;

  packet_t exp_tl1, exp_tl2;
  word_t   exp_rx [N_RX];
  logic [N_RX-1:0] exp_hit;

  router dut (.clk, .rst_n, .mode, .pe_pkt, .sel_en, .sel_addr, .tl1_in, .tl1_out,
              .tl2_in, .tl2_out, .rx_data, .rx_hit);

  always #5 clk = ~clk;

  function automatic packet_t rand_pkt(input int vpct);
    packet_t p;
    p.valid = ($urandom_range(0, 99) < vpct);
    p.src   = addr_t'($urandom_range(0, 7));  // few sources so matches are frequent
    p.data  = $urandom;
    return p;
  endfunction

  // Model of one clock edge, computed from the inputs before the edge.
  task automatic model_edge();
    packet_t m1, m2;
    m1 = (mode == MODE_RR) ? tl1_in : pe_pkt;
    m2 = (mode == MODE_RR) ? tl2_in : pe_pkt;
    exp_tl1 = m1; exp_tl1.valid = m1.valid && mode != MODE_IDLE;
    exp_tl2 = m2; exp_tl2.valid = m2.valid && mode != MODE_IDLE;
    for (int k = 0; k < N_RX; k++) begin
      logic h1, h2;
      h1 = mode != MODE_IDLE && sel_en[k] && m1.valid && m1.src == sel_addr[k];
      h2 = mode != MODE_IDLE && sel_en[k] && m2.valid && m2.src == sel_addr[k];
      exp_hit[k] = h1 || h2;
      if (h1) exp_rx[k] = m1.data;
      else if (h2) exp_rx[k] = m2.data;
    end
  endtask

  task automatic compare(input string what);
    checks++;
    if (tl1_out.valid !== exp_tl1.valid ||
        (exp_tl1.valid && (tl1_out.src !== exp_tl1.src || tl1_out.data !== exp_tl1.data))) begin
      failures++; $display("FAIL %s TL1 got %p want %p", what, tl1_out, exp_tl1);
    end
    checks++;
    if (tl2_out.valid !== exp_tl2.valid ||
        (exp_tl2.valid && (tl2_out.src !== exp_tl2.src || tl2_out.data !== exp_tl2.data))) begin
      failures++; $display("FAIL %s TL2 got %p want %p", what, tl2_out, exp_tl2);
    end
    for (int k = 0; k < N_RX; k++) begin
      checks++;
      if (rx_data[k] !== exp_rx[k] || rx_hit[k] !== exp_hit[k]) begin
        failures++;
        $display("FAIL %s rx%0d got %h/%b want %h/%b", what, k, rx_data[k], rx_hit[k], exp_rx[k], exp_hit[k]);
      end
    end
  endtask

  task automatic step(input string what);
    model_edge();
    @(posedge clk); #1;
    compare(what);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_self = 0, n_tl1 = 0, n_tl2 = 0;

  initial begin
    mode = MODE_IDLE; pe_pkt = '0; tl1_in = '0; tl2_in = '0; sel_en = '0;
    sel_addr[0] = '0; sel_addr[1] = '0;
    exp_rx[0] = '0; exp_rx[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // PE-router cycle, the router listening to its own address on register 0
    mode = MODE_PE; pe_pkt = '{valid: 1'b1, src: 5'd5, data: 32'h1111_1111};
    tl1_in = '{valid: 1'b1, src: 5'd3, data: 32'h3333_3333};
    sel_en = 2'b11; sel_addr[0] = 5'd5; sel_addr[1] = 5'd3;
    step("pe-mode");
    if (rx_data[0] === 32'h1111_1111 && rx_hit === 2'b01) n_self++;
    // router-router: register 1 takes source 3 from TL1, register 0 source 9 from TL2
    mode = MODE_RR; sel_addr[0] = 5'd9;
    tl2_in = '{valid: 1'b1, src: 5'd9, data: 32'h9999_9999};
    step("rr-mode");
    if (rx_data[1] === 32'h3333_3333) n_tl1++;
    if (rx_data[0] === 32'h9999_9999) n_tl2++;
    // selection disabled: nothing captured
    sel_en = 2'b00; tl1_in.data = 32'hdead_beef; tl2_in.data = 32'hdead_beef;
    step("disabled");
    // idle: lines empty
    mode = MODE_IDLE; sel_en = 2'b11;
    step("idle");

    for (int n = 0; n < 3000; n++) begin
      case ($urandom_range(0, 3))
        0:       mode = MODE_IDLE;
        1:       mode = MODE_PE;
        default: mode = MODE_RR;
      endcase
      pe_pkt = rand_pkt(70); tl1_in = rand_pkt(70); tl2_in = rand_pkt(70);
      // keep source addresses unique among the packets in flight
      if (tl1_in.src == tl2_in.src) tl2_in.valid = 1'b0;
      sel_en = 2'($urandom);
      sel_addr[0] = addr_t'($urandom_range(0, 7));
      sel_addr[1] = addr_t'($urandom_range(0, 7));
      step("random");
    end
    checks++;
    if (n_self == 0 || n_tl1 == 0 || n_tl2 == 0) begin
      failures++; $display("FAIL directed receptions self=%0d tl1=%0d tl2=%0d", n_self, n_tl1, n_tl2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
