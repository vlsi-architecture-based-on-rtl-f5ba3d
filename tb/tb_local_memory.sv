// tb_local_memory: fills the 256-word local memory with random words, reads all back,
// and checks read-before-write on one edge and that rdata holds while re is low.
module tb_local_memory;
  localparam int unsigned W = 32, D = 256;
  logic clk = 0, we, re;
  logic [7:0] addr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  local_memory #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we, .re, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [W-1:0] got, input logic [W-1:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got %h want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; addr = '0; wdata = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; addr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = D - 1; i >= 0; i--) begin
      @(negedge clk); re = 1; addr = 8'(i);
      @(negedge clk); re = 0;
      expect_eq(rdata, model[i], $sformatf("read %0d", i));
    end
    // read and write of the same word on one edge returns the old word
    @(negedge clk); re = 1; we = 1; addr = 8'd17; wdata = 32'hcafe_f00d;
    @(negedge clk); re = 0; we = 0;
    expect_eq(rdata, model[17], "read-before-write");
    repeat (3) @(negedge clk);
    expect_eq(rdata, model[17], "rdata holds");
    @(negedge clk); re = 1; addr = 8'd17;
    @(negedge clk); re = 0;
    expect_eq(rdata, 32'hcafe_f00d, "written word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
