// tb_control_memory: writes every word of the control memory and checks the
// asynchronous read port, including that a read sees a write right after its edge.
module tb_control_memory;
  localparam int unsigned W = 32, D = 256;
  logic clk = 0, we;
  logic [7:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  control_memory #(.WIDTH(W), .DEPTH(D)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata; raddr = 8'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL write-through %0d", i); end
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      raddr = 8'($urandom_range(0, D - 1));
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL read %0d got %h want %h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
