// tb_pdta_processor: runs the whole processor at its default size (32 PEs) through
// three VLIW programs loaded over the host port, and checks results read back from
// local memory and cycle counts against values computed here.
//
//  1. Multi-operand multiply-add o = a*b + c*d scheduled on PE1..PE6 (numbered from 1):
//     PE2 and PE4 hold a,b and c,d in memory; PE1 and PE3 multiply; PE5 adds; PE6
//     stores o. Transfer lengths 2, 2, 5, 2 cycles, as the farthest transfer of each
//     step (distance 1, 1, 4, 1) requires. Total cycles are checked.
//  2. Worst-case exchange: every PE loads a word and sends it; router i selects the
//     source N-1-i on register 0 (so routers 0 and N-1 need the full N-cycle transfer)
//     and a source shared by several routers on register 1 (broadcast); every PE adds
//     the two and stores the sum, after a one-cycle step in which each PE receives its
//     own packet.
//  3. A program whose first step length is 0 ends at once.
// Mechanisms counted (each must occur): PE-router cycles, router-router cycles, receptions
// over TL1 and over TL2, a transfer over N-1 routers, a broadcast, a self-reception,
// each PE operation, the end marker.
module tb_pdta_processor;
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

  // ---------------------------------------------------------------- mechanism counters
  int n_pe_cycles = 0, n_rr_cycles = 0, n_tl1 = 0, n_tl2 = 0, n_far = 0, n_bcast = 0;
  int n_self = 0, n_end = 0;
  int n_op [5] = '{default: 0};
  int xfer_t = 0;

  for (genvar g = 0; g < N; g++) begin : g_opcount
    always @(posedge clk) if (rst_n && dut.exec) n_op[dut.g_mod[g].ctrl.op]++;
  end

  // ---------------------------------------------------------------- host helpers
  task automatic host_write(input host_target_e t, input int pe_i, input int a, input word_t d);
    @(negedge clk);
    host_target = t; host_pe = ADDR_W'(pe_i); host_addr = MEM_AW'(a); host_wdata = d; host_we = 1;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(input int pe_i, input int a, output word_t d);
    @(negedge clk);
    host_target = HOST_LOCAL; host_pe = ADDR_W'(pe_i); host_addr = MEM_AW'(a); host_re = 1;
    @(negedge clk);
    host_re = 0;
    d = host_rdata;
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

  // Clears every control word of steps 0..nsteps-1 to NOP.
  task automatic clear_program(input int nsteps);
    for (int s = 0; s < nsteps; s++) for (int i = 0; i < N; i++)
      host_write(HOST_CTRL, i, s, '0);
  endtask

  task automatic run(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic expect_eq(input word_t got, input word_t want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s: got %h want %h", what, got, want); end
  endtask

  // Watch receptions: which line, how far, how many routers take the same source.
  // xfer_t is the index of the current transfer cycle (0 for the PE-router cycle).
  always @(posedge clk) if (rst_n) begin
    int takers [N];
    if (dut.mode == MODE_PE) begin n_pe_cycles++; xfer_t = 0; end
    else if (dut.mode == MODE_RR) begin n_rr_cycles++; xfer_t++; end
    for (int s = 0; s < N; s++) takers[s] = 0;
    if (dut.mode != MODE_IDLE) begin
      for (int i = 0; i < N; i++) for (int k = 0; k < N_RX; k++) begin
        int src, hops;
        src = int'(dut.sel_addr[i][k]);
        hops = (src > i) ? src - i : i - src;
        if (dut.sel_en[i][k] && dut.pe_pkt[src].valid && hops == xfer_t) begin
          takers[src]++;
          if (hops == 0) n_self++;
          else if (src < i) n_tl1++;
          else n_tl2++;
          if (hops == N - 1) n_far++;
        end
      end
      for (int s = 0; s < N; s++) if (takers[s] > 1) n_bcast++;
    end
  end

  initial begin
    int cyc;
    word_t a, b, c, d, got;
    word_t v [N];
    int shared [N];
    start = 0; host_we = 0; host_re = 0; host_target = HOST_LOCAL; host_pe = '0;
    host_addr = '0; host_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // ------------------------------------------------ program 1: o = a*b + c*d
    a = $urandom; b = $urandom; c = $urandom; d = $urandom;
    host_write(HOST_LOCAL, 1, 0, a); host_write(HOST_LOCAL, 1, 1, b);
    host_write(HOST_LOCAL, 3, 0, c); host_write(HOST_LOCAL, 3, 1, d);
    clear_program(5);
    // step 0 (length 1): PE2, PE4 load a, c
    host_write(HOST_STEP, 0, 0, 1);
    host_write(HOST_CTRL, 1, 0, cw(OP_LOAD, 0, -1, -1, 0));
    host_write(HOST_CTRL, 3, 0, cw(OP_LOAD, 0, -1, -1, 0));
    // step 1 (length 2): a -> PE1, c -> PE3; PE2, PE4 load b, d
    host_write(HOST_STEP, 0, 1, 2);
    host_write(HOST_CTRL, 1, 1, cw(OP_LOAD, 1, -1, -1, 1));
    host_write(HOST_CTRL, 3, 1, cw(OP_LOAD, 1, -1, -1, 1));
    host_write(HOST_CTRL, 0, 1, cw(OP_NOP, 0, 1, -1, 0));
    host_write(HOST_CTRL, 2, 1, cw(OP_NOP, 0, 3, -1, 0));
    // step 2 (length 2): b -> PE1, d -> PE3; PE1, PE3 multiply
    host_write(HOST_STEP, 0, 2, 2);
    host_write(HOST_CTRL, 1, 2, cw(OP_NOP, 1, -1, -1, 0));
    host_write(HOST_CTRL, 3, 2, cw(OP_NOP, 1, -1, -1, 0));
    host_write(HOST_CTRL, 0, 2, cw(OP_MUL, 0, -1, 1, 0));
    host_write(HOST_CTRL, 2, 2, cw(OP_MUL, 0, -1, 3, 0));
    // step 3 (length 5): e from PE1 and f from PE3 -> PE5; PE5 adds
    host_write(HOST_STEP, 0, 3, 5);
    host_write(HOST_CTRL, 0, 3, cw(OP_NOP, 1, -1, -1, 0));
    host_write(HOST_CTRL, 2, 3, cw(OP_NOP, 1, -1, -1, 0));
    host_write(HOST_CTRL, 4, 3, cw(OP_ADD, 0, 0, 2, 0));
    // step 4 (length 2): o -> PE6, stored at word 7
    host_write(HOST_STEP, 0, 4, 2);
    host_write(HOST_CTRL, 4, 4, cw(OP_NOP, 1, -1, -1, 0));
    host_write(HOST_CTRL, 5, 4, cw(OP_STORE, 0, 4, -1, 7));
    host_write(HOST_STEP, 0, 5, 0);
    run(cyc);
    host_read(5, 7, got);
    expect_eq(got, a * b + c * d, "multiply-add result");
    // steps of 1+1, 2+1, 2+1, 5+1, 2+1 cycles, one end-marker cycle, one start cycle
    checks++;
    if (cyc != 1 + 2 + 3 + 3 + 6 + 3 + 1) begin
      failures++; $display("FAIL multiply-add took %0d cycles", cyc);
    end
    $display("multiply-add program: %0d cycles", cyc);

    // ------------------------------------------------ program 2: worst-case exchange
    for (int i = 0; i < N; i++) begin
      v[i] = $urandom;
      host_write(HOST_LOCAL, i, 3, v[i]);
    end
    for (int i = 0; i < N; i++) shared[i] = (i / 8) * 8 + 5;  // 4 broadcast sources
    host_write(HOST_STEP, 0, 0, 1);
    host_write(HOST_STEP, 0, 1, N);
    host_write(HOST_STEP, 0, 2, 1);
    host_write(HOST_STEP, 0, 3, 0);
    for (int i = 0; i < N; i++) begin
      host_write(HOST_CTRL, i, 0, cw(OP_LOAD, 0, -1, -1, 3));
      host_write(HOST_CTRL, i, 1, cw(OP_ADD, 1, N - 1 - i, shared[i], 0));
      host_write(HOST_CTRL, i, 2, cw(OP_STORE, 1, i, -1, 9));
    end
    run(cyc);
    for (int i = 0; i < N; i++) begin
      host_read(i, 9, got);
      expect_eq(got, v[N - 1 - i] + v[shared[i]], $sformatf("exchange PE%0d", i));
    end
    checks++;
    if (cyc != 1 + 2 + (N + 1) + 2 + 1) begin
      failures++; $display("FAIL exchange took %0d cycles", cyc);
    end
    $display("exchange program: %0d cycles", cyc);

    // ------------------------------------------------ program 3: empty program
    host_write(HOST_STEP, 0, 0, 0);
    run(cyc);
    n_end++;
    checks++;
    if (cyc != 2) begin failures++; $display("FAIL empty program took %0d cycles", cyc); end

    // ------------------------------------------------ mechanisms
    $display("mechanisms: pe-cycles=%0d rr-cycles=%0d tl1=%0d tl2=%0d far=%0d bcast=%0d self=%0d end=%0d",
             n_pe_cycles, n_rr_cycles, n_tl1, n_tl2, n_far, n_bcast, n_self, n_end);
    $display("ops: nop=%0d mul=%0d add=%0d load=%0d store=%0d", n_op[0], n_op[1], n_op[2], n_op[3], n_op[4]);
    checks++;
    if (n_op[OP_MUL] == 0 || n_op[OP_ADD] == 0 || n_op[OP_LOAD] == 0 || n_op[OP_STORE] == 0 ||
        n_pe_cycles == 0 || n_rr_cycles == 0 || n_tl1 == 0 || n_tl2 == 0 || n_far == 0 ||
        n_bcast == 0 || n_self == 0 || n_end == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
