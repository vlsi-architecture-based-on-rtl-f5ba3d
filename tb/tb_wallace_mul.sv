// tb_wallace_mul: checks the Wallace-tree multiplier's low product word against the
// simulator's multiplication for corner and random operands.
module tb_wallace_mul;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, p;
  int checks = 0, failures = 0;

  wallace_mul #(.DATA_W(W)) dut (.a, .b, .p);

  task automatic check();
    logic [2*W-1:0] full;
    #1;
    full = {{W{1'b0}}, a} * {{W{1'b0}}, b};
    checks++;
    if (p !== full[W-1:0]) begin
      failures++;
      $display("FAIL a=%h b=%h got %h want %h", a, b, p, full[W-1:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corners [6] = '{'0, 32'd1, '1, 32'h8000_0000, 32'h0001_0000, 32'h1234_5678};
    foreach (corners[i]) foreach (corners[j]) begin
      a = corners[i]; b = corners[j]; check();
    end
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = $urandom; check();
    end
    for (int n = 0; n < 500; n++) begin
      a = $urandom_range(0, 65535); b = $urandom_range(0, 65535); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
