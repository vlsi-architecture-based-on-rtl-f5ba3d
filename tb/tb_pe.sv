// tb_pe: drives one PE with control words and receive-register values and checks each
// operation against values computed here: multiply and add of the two received words,
// load from and store into local memory (also through the host port), and the packet
// the PE offers (valid only when send is set, carrying the PE's own address and its
// latest result).
module tb_pe;
  import pdta_pkg::*;
  localparam int unsigned MY = 13;
  logic clk = 0, rst_n = 0, exec, host_en, host_we, host_re;
  ctrl_word_t ctrl;
  word_t rx_data [N_RX];
  packet_t tx_pkt;
  logic [MEM_AW-1:0] host_addr;
  word_t host_wdata, host_rdata;
  word_t model [MEM_DEPTH];
  int checks = 0, failures = 0;
  int n_op [5] = '{default: 0};

  pe #(.MY_ADDR(MY)) dut (.clk, .rst_n, .exec, .ctrl, .rx_data, .tx_pkt, .host_en, .host_we,
                          .host_re, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_op(input pe_op_e op, input logic [7:0] maddr);
    @(negedge clk);
    ctrl = '0; ctrl.op = op; ctrl.maddr = maddr; exec = 1;
    @(negedge clk);
    exec = 0; ctrl.op = OP_NOP;
    n_op[op]++;
  endtask

  task automatic expect_tx(input word_t want, input string what);
    ctrl.send = 1; #1;
    checks++;
    if (!tx_pkt.valid || tx_pkt.src !== addr_t'(MY) || tx_pkt.data !== want) begin
      failures++; $display("FAIL %s tx %p want data %h", what, tx_pkt, want);
    end
    ctrl.send = 0; #1;
    checks++;
    if (tx_pkt.valid) begin failures++; $display("FAIL %s valid without send", what); end
  endtask

  initial begin
    exec = 0; ctrl = '0; host_en = 1; host_we = 0; host_re = 0; host_addr = '0; host_wdata = '0;
    rx_data[0] = '0; rx_data[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // host fills local memory
    for (int i = 0; i < MEM_DEPTH; i++) begin
      @(negedge clk); host_we = 1; host_addr = 8'(i); host_wdata = $urandom; model[i] = host_wdata;
    end
    @(negedge clk); host_we = 0; host_en = 0;

    for (int n = 0; n < 300; n++) begin
      logic [7:0] a;
      word_t x, y;
      x = $urandom; y = $urandom; a = 8'($urandom);
      rx_data[0] = x; rx_data[1] = y;
      case (n % 4)
        0: begin do_op(OP_MUL, a);   expect_tx(x * y, "mul"); end
        1: begin do_op(OP_ADD, a);   expect_tx(x + y, "add"); end
        2: begin do_op(OP_LOAD, a);  expect_tx(model[a], "load"); end
        default: begin
          word_t prev_res;
          prev_res = tx_pkt.data;
          do_op(OP_STORE, a); model[a] = x;
          expect_tx(prev_res, "store keeps result");
          do_op(OP_LOAD, a);  expect_tx(x, "load after store");
        end
      endcase
      // NOP keeps the result
      begin
        word_t keep;
        keep = tx_pkt.data;
        do_op(OP_NOP, a);
        expect_tx(keep, "nop");
      end
    end
    // host reads back the memory
    @(negedge clk); host_en = 1;
    for (int i = 0; i < MEM_DEPTH; i += 7) begin
      @(negedge clk); host_re = 1; host_addr = 8'(i);
      @(negedge clk); host_re = 0;
      checks++;
      if (host_rdata !== model[i]) begin failures++; $display("FAIL host read %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
