// wallace_mul: Wallace-tree multiplier, the PE's multiplier.
//
// The DATA_W partial products (a shifted by i, gated by b[i]) are reduced in layers of
// 3:2 carry-save adders: every three rows become a sum row and a shifted carry row, rows
// left over pass to the next layer, until two rows remain; a carry-lookahead adder adds
// those. Only the low DATA_W bits of the product are formed, so the result is the
// product modulo 2^DATA_W (one word, as the PE works on single words). Unsigned and
// two's-complement operands give the same low word. Purely combinational.
// The Wallace-tree type is the architecture's; truncation to one word is this design's
// choice.
module wallace_mul #(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] p
);

  // Rows left after layer l of the reduction, starting from DATA_W rows.
  function automatic int unsigned rows_after(int unsigned w, int unsigned l);
    int unsigned r = w;
    for (int unsigned i = 0; i < l; i++) r = r - r / 3;
    return r;
  endfunction

  function automatic int unsigned layers(int unsigned w);
    int unsigned r = w;
    int unsigned n = 0;
    while (r > 2) begin
      r = r - r / 3;
      n++;
    end
    return n;
  endfunction

  localparam int unsigned NL = layers(DATA_W);

  logic [DATA_W-1:0] pp [DATA_W];   // partial products

  for (genvar i = 0; i < DATA_W; i++) begin : g_pp
    assign pp[i] = (a << i) & {DATA_W{b[i]}};
  end

  // Layer l turns R rows (rin) into RN = R - R/3 rows (rout).
  for (genvar l = 0; l < NL; l++) begin : g_layer
    localparam int unsigned R  = rows_after(DATA_W, l);
    localparam int unsigned G  = R / 3;
    localparam int unsigned RN = R - G;
    logic [DATA_W-1:0] rin  [R];
    logic [DATA_W-1:0] rout [RN];
    if (l == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      for (genvar r = 0; r < R; r++) begin : g_row
        assign rin[r] = g_layer[l-1].rout[r];
      end
    end
    for (genvar k = 0; k < G; k++) begin : g_csa
      assign rout[2*k]   = rin[3*k] ^ rin[3*k+1] ^ rin[3*k+2];
      assign rout[2*k+1] = ((rin[3*k] & rin[3*k+1]) | (rin[3*k] & rin[3*k+2])
                          | (rin[3*k+1] & rin[3*k+2])) << 1;
    end
    for (genvar r = 3 * G; r < R; r++) begin : g_pass
      assign rout[2*G + r - 3*G] = rin[r];
    end
  end

  logic unused_cout;

  cla_adder #(.DATA_W(DATA_W)) u_final (
    .a(g_layer[NL-1].rout[0]), .b(g_layer[NL-1].rout[1]), .cin(1'b0), .sum(p), .cout(unused_cout)
  );

endmodule
