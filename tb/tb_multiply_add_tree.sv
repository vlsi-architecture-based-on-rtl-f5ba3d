// tb_multiply_add_tree: multi-operand multiply-add on all 32 PEs of the default
// processor: s = sum over i of x_i * y_i (mod 2^32), with x_i and y_i in PE i's local
// memory. The testbench schedules it statically, as the architecture intends:
//   step 0      (length 1): every PE loads x_i
//   step 1      (length 1): every PE sends x_i to itself (receive register 0), loads y_i
//   step 2      (length 1): every PE sends y_i to itself (receive register 1), multiplies
//   steps 3..7  (length s+1, s = 1,2,4,8,16): PE i, i a multiple of 2s, adds its own
//               partial sum (register 0) and the one of PE i+s (register 1)
//   step 8      (length 1): PE 0 sends the total to itself and stores it at word 5
//   step 9      end
// Checked: the total read back from PE 0, every partial sum of the tree, and the cycle
// count (sum of step lengths plus one operation cycle per step, plus start and end).
module tb_multiply_add_tree;
  import pdta_pkg::*;
  localparam int unsigned N = N_PE_DEF;

  logic clk = 0, rst_n = 0, start, busy, done, host_we, host_re;
  host_target_e host_target;
  logic [ADDR_W-1:0] host_pe;
  logic [MEM_AW-1:0] host_addr;
  word_t host_wdata, host_rdata;
  int checks = 0, failures = 0;

  pdta_processor dut (.clk, .rst_n, .start, .busy, .done, .host_target, .host_pe, .host_addr,
                      .host_we, .host_re, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input host_target_e t, input int pe_i, input int a, input word_t d);
    @(negedge clk);
    host_target = t; host_pe = ADDR_W'(pe_i); host_addr = MEM_AW'(a); host_wdata = d; host_we = 1;
    @(negedge clk);
    host_we = 0;
  endtask

  function automatic ctrl_word_t cw(input pe_op_e op, input bit send, input int s0, input int s1,
                                    input int maddr);
    ctrl_word_t c;
    c = '0;
    c.op = op; c.send = send; c.maddr = MEM_AW'(maddr);
    if (s0 >= 0) begin c.sel0_en = 1'b1; c.sel0 = addr_t'(s0); end
    if (s1 >= 0) begin c.sel1_en = 1'b1; c.sel1 = addr_t'(s1); end
    return c;
  endfunction

  word_t x [N], y [N], part [N];
  int lens [$];

  // Partial sums after each tree level, taken at the operation cycle of the step.
  int level_seen = 0;
  always @(posedge clk) if (rst_n && dut.exec && dut.pc >= 3 && dut.pc <= 7) begin
    int s;
    s = 1 << (int'(dut.pc) - 3);
    for (int i = 0; i < N; i += 2 * s) begin
      checks++;
      if (dut.rx_data[i][0] !== part[i] || dut.rx_data[i][1] !== part[i + s]) begin
        failures++;
        $display("FAIL level s=%0d PE%0d operands %h %h want %h %h", s, i, dut.rx_data[i][0],
                 dut.rx_data[i][1], part[i], part[i + s]);
      end
      part[i] = part[i] + part[i + s];
    end
    level_seen++;
  end

  initial begin
    int cyc, want_cyc;
    word_t total, got;
    start = 0; host_we = 0; host_re = 0; host_target = HOST_LOCAL; host_pe = '0;
    host_addr = '0; host_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    total = '0;
    for (int i = 0; i < N; i++) begin
      x[i] = $urandom; y[i] = $urandom;
      part[i] = x[i] * y[i];
      total += part[i];
      host_write(HOST_LOCAL, i, 0, x[i]);
      host_write(HOST_LOCAL, i, 1, y[i]);
    end

    lens = '{1, 1, 1};
    for (int i = 0; i < N; i++) begin
      host_write(HOST_CTRL, i, 0, cw(OP_LOAD, 0, -1, -1, 0));
      host_write(HOST_CTRL, i, 1, cw(OP_LOAD, 1, i, -1, 1));
      host_write(HOST_CTRL, i, 2, cw(OP_MUL, 1, -1, i, 0));
    end
    for (int l = 0; (1 << l) < N; l++) begin
      int s;
      s = 1 << l;
      lens.push_back(s + 1);
      for (int i = 0; i < N; i++) begin
        if (i % (2 * s) == 0)  host_write(HOST_CTRL, i, 3 + l, cw(OP_ADD, 1, i, i + s, 0));
        else if (i % s == 0)   host_write(HOST_CTRL, i, 3 + l, cw(OP_NOP, 1, -1, -1, 0));
        else                   host_write(HOST_CTRL, i, 3 + l, cw(OP_NOP, 0, -1, -1, 0));
      end
    end
    host_write(HOST_CTRL, 0, lens.size(), cw(OP_STORE, 1, 0, -1, 5));
    for (int i = 1; i < N; i++) host_write(HOST_CTRL, i, lens.size(), '0);
    lens.push_back(1);
    foreach (lens[k]) host_write(HOST_STEP, 0, k, lens[k]);
    host_write(HOST_STEP, 0, lens.size(), 0);

    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end

    @(negedge clk);
    host_target = HOST_LOCAL; host_pe = '0; host_addr = 8'd5; host_re = 1;
    @(negedge clk);
    host_re = 0;
    got = host_rdata;
    checks++;
    if (got !== total) begin failures++; $display("FAIL total %h want %h", got, total); end

    want_cyc = 2;  // start cycle and end-marker cycle
    foreach (lens[k]) want_cyc += lens[k] + 1;
    checks++;
    if (cyc != want_cyc) begin failures++; $display("FAIL took %0d cycles, want %0d", cyc, want_cyc); end
    checks++;
    if (level_seen != 5) begin failures++; $display("FAIL %0d tree levels seen", level_seen); end
    $display("32-term multiply-add: %0d cycles, %0d steps", cyc, lens.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
