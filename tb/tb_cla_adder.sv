// tb_cla_adder: checks the carry-lookahead adder against the simulator's own addition
// for corner operands and random operands, with both carry-in values.
module tb_cla_adder;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cla_adder #(.DATA_W(W)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check();
    logic [W:0] ref_sum;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h want %h", a, b, cin, cout, sum, ref_sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corners [6] = '{'0, '1, 32'h8000_0000, 32'h7fff_ffff, 32'h0000_ffff, 32'hffff_0000};
    foreach (corners[i]) foreach (corners[j]) for (int c = 0; c < 2; c++) begin
      a = corners[i]; b = corners[j]; cin = c[0]; check();
    end
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = $urandom; cin = $urandom_range(0, 1); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
