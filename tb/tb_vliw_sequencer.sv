// tb_vliw_sequencer: loads a program of step lengths, runs it, and checks the mode,
// exec and pc of every cycle against the step rule (one MODE_PE cycle, L-1 MODE_RR
// cycles, one exec cycle per step of length L), the end marker (length 0), the done
// pulse and the total cycle count. A second run uses all 256 steps with no end marker.
module tb_vliw_sequencer;
  import pdta_pkg::*;
  logic clk = 0, rst_n = 0, start, len_we, exec, busy, done;
  logic [7:0] len_waddr, pc;
  logic [STEP_LEN_W-1:0] len_wdata;
  mode_e mode;
  int checks = 0, failures = 0;

  vliw_sequencer dut (.clk, .rst_n, .start, .len_we, .len_waddr, .len_wdata, .mode, .exec,
                      .pc, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(input mode_e m, input logic ex, input int p, input string what);
    checks++;
    if (mode !== m || exec !== ex || int'(pc) != p || !busy) begin
      failures++;
      $display("FAIL %s: mode=%s exec=%b pc=%0d busy=%b want %s %b %0d", what, mode.name(), exec,
               pc, busy, m.name(), ex, p);
    end
  endtask

  task automatic run(input int lens [$]);
    int total;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    total = 0;
    foreach (lens[s]) begin
      if (lens[s] == 0) break;
      expect_cycle(MODE_PE, 1'b0, s, "t0");
      @(negedge clk); total++;
      for (int t = 1; t < lens[s]; t++) begin
        expect_cycle(MODE_RR, 1'b0, s, "rr");
        @(negedge clk); total++;
      end
      expect_cycle(MODE_IDLE, 1'b1, s, "exec");
      @(negedge clk); total++;
    end
    if (lens.size() < 256) begin
      expect_cycle(MODE_IDLE, 1'b0, lens.size() - 1, "end marker");
      @(negedge clk); total++;
    end
    checks++;
    if (!done || busy || pc != 0) begin failures++; $display("FAIL done=%b busy=%b", done, busy); end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    begin
      int want;
      want = 0;
      foreach (lens[s]) begin
        if (lens[s] == 0) begin want++; break; end
        want += lens[s] + 1;
      end
      checks++;
      if (total != want) begin failures++; $display("FAIL program took %0d cycles, want %0d", total, want); end
    end
    $display("program of %0d steps took %0d cycles", lens.size(), total);
  endtask

  initial begin
    int prog [$];
    start = 0; len_we = 0; len_waddr = '0; len_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prog = '{1, 2, 2, 5, 2, 32, 0};
    foreach (prog[i]) begin
      @(negedge clk); len_we = 1; len_waddr = 8'(i); len_wdata = 8'(prog[i]);
    end
    @(negedge clk); len_we = 0;
    checks++;
    if (busy || mode != MODE_IDLE) begin failures++; $display("FAIL not idle"); end
    run(prog);

    // 256 steps, no end marker
    prog = {};
    for (int i = 0; i < 256; i++) begin
      prog.push_back($urandom_range(1, 4));
      @(negedge clk); len_we = 1; len_waddr = 8'(i); len_wdata = 8'(prog[i]);
    end
    @(negedge clk); len_we = 0;
    run(prog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
