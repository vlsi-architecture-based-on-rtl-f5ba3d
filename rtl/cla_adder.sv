// cla_adder: carry-lookahead adder, the PE's adder.
//
// Bit generate/propagate signals feed 4-bit lookahead groups; each group also forms a
// group generate/propagate, and four groups at a time share a second lookahead level, so
// a carry crosses 16 bits in two gate levels. Carries between 16-bit sections ripple.
// Purely combinational. The carry-lookahead type is the architecture's; the group sizes
// are this design's choice. DATA_W must be a multiple of 16.
module cla_adder #(
  parameter int unsigned DATA_W = 32
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              cin,
  output logic [DATA_W-1:0] sum,
  output logic              cout
);

  localparam int unsigned NG = DATA_W / 4;   // 4-bit groups
  localparam int unsigned NS = NG / 4;       // 16-bit sections

  // Carries c[1..4] of a 4-wide lookahead unit from generate gi, propagate pi, carry-in c0.
  function automatic logic [4:1] lookahead4(input logic [3:0] gi, input logic [3:0] pi,
                                            input logic c0);
    lookahead4[1] = gi[0] | (pi[0] & c0);
    lookahead4[2] = gi[1] | (pi[1] & gi[0]) | (pi[1] & pi[0] & c0);
    lookahead4[3] = gi[2] | (pi[2] & gi[1]) | (pi[2] & pi[1] & gi[0]) | (pi[2] & pi[1] & pi[0] & c0);
    lookahead4[4] = gi[3] | (pi[3] & gi[2]) | (pi[3] & pi[2] & gi[1]) | (pi[3] & pi[2] & pi[1] & gi[0])
                  | (pi[3] & pi[2] & pi[1] & pi[0] & c0);
  endfunction

  logic [DATA_W-1:0] g, p, c;
  logic [NG-1:0]     gg, gp;     // group generate / propagate
  logic [NG-1:0]     gc;         // carry into each group
  logic              sc;         // carry into the next 16-bit section
  logic [4:1]        t;

  always_comb begin
    g = a & b;
    p = a ^ b;
    for (int j = 0; j < NG; j++) begin
      gg[j] = g[4*j+3] | (p[4*j+3] & g[4*j+2]) | (p[4*j+3] & p[4*j+2] & g[4*j+1])
            | (p[4*j+3] & p[4*j+2] & p[4*j+1] & g[4*j]);
      gp[j] = &p[4*j +: 4];
    end
    sc = cin;
    for (int s = 0; s < NS; s++) begin
      t = lookahead4(gg[4*s +: 4], gp[4*s +: 4], sc);
      gc[4*s] = sc;
      for (int k = 1; k < 4; k++) gc[4*s+k] = t[k];
      sc = t[4];
    end
    for (int j = 0; j < NG; j++) begin
      t = lookahead4(g[4*j +: 4], p[4*j +: 4], gc[j]);
      c[4*j] = gc[j];
      for (int k = 1; k < 4; k++) c[4*j+k] = t[k];
    end
    sum  = p ^ c;
    cout = sc;
  end

  initial assert (DATA_W % 16 == 0) else $error("cla_adder: DATA_W must be a multiple of 16");

endmodule
