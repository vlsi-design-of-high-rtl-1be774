// bk_ppa: modified Brent-Kung parallel-prefix adder, the nucleus stage of the
// hybrid carry-skip adder.
//
// Preprocessing forms the bit generate g[i] = a[i] & b[i] and propagate
// p[i] = a[i] ^ b[i]. The Brent-Kung prefix network then computes the group
// pair (G, P) of every prefix [i:0] with the usual up-sweep (a binary tree
// that yields the longest prefix, [W-1:0], after log2(W) levels) and
// down-sweep (the backward paths that fill in the intermediate prefixes).
// Postprocessing turns the prefixes and the stage's carry in into the sum
// bits. The adder is "modified" in that it does not form its own carry out:
// it hands the group generate and group propagate of the whole stage to the
// skip logic of the surrounding carry-skip adder, which forms the carry out
// as g_grp | (p_grp & cin).
//
// Interface: sum = (a + b + cin) mod 2^WIDTH, g_grp = carry out of a + b,
// p_grp = &(a ^ b). Combinational. WIDTH need not be a power of two: the
// prefix network is built for the next power of two with the spare bits tied
// to zero.
module bk_ppa #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             g_grp,
  output logic             p_grp
);
  localparam int unsigned LOGL = (WIDTH <= 1) ? 1 : $clog2(WIDTH);
  localparam int unsigned L    = 1 << LOGL;

  logic [WIDTH-1:0] g, p;
  logic [L-1:0]     gp, pp;   // prefix generate / propagate of [i:0]
  logic [WIDTH-1:0] c;        // carry into each bit

  // Preprocessing.
  assign g = a & b;
  assign p = a ^ b;

  // Prefix network (Brent-Kung).
  always_comb begin
    gp = '0;
    pp = '0;
    gp[WIDTH-1:0] = g;
    pp[WIDTH-1:0] = p;
    // Up-sweep: forward paths.
    for (int d = 0; d < int'(LOGL); d++) begin
      for (int i = (2 << d) - 1; i < int'(L); i += (2 << d)) begin
        gp[i] = gp[i] | (pp[i] & gp[i - (1 << d)]);
        pp[i] = pp[i] & pp[i - (1 << d)];
      end
    end
    // Down-sweep: backward paths.
    for (int d = int'(LOGL) - 2; d >= 0; d--) begin
      for (int i = 3 * (1 << d) - 1; i < int'(L); i += (2 << d)) begin
        gp[i] = gp[i] | (pp[i] & gp[i - (1 << d)]);
        pp[i] = pp[i] & pp[i - (1 << d)];
      end
    end
  end

  // Postprocessing.
  assign c[0] = cin;
  for (genvar i = 1; i < WIDTH; i++) begin : g_post
    assign c[i] = gp[i-1] | (pp[i-1] & cin);
  end
  assign sum   = p ^ c;
  assign g_grp = gp[WIDTH-1];
  assign p_grp = pp[WIDTH-1];
endmodule
