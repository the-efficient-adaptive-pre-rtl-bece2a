// cla_adder -- two-level carry-lookahead adder.
//
// Bits are grouped by GROUP (default 4). Each group forms its generate and
// propagate signals GG = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0 and
// GP = p3 p2 p1 p0. A second level computes every group's carry-in directly
// from the GG/GP of all lower groups and the adder's carry-in (no ripple
// between groups), and inside each group every bit carry is again a
// lookahead expression of the group carry-in. The sum is p ^ carry.
// The published design asks for a fast CLA adder without detailing it; the
// two-level structure is this design's choice. W must be a multiple of GROUP.
// Combinational.
module cla_adder #(
  parameter int unsigned W     = 32,
  parameter int unsigned GROUP = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = W / GROUP;

  logic [W-1:0]  g, p;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;          // carry into each group, gc[NG] = carry out
  logic [W:0]    c;           // carry into each bit

  always_comb begin
    g = x & y;
    p = x ^ y;

    // group generate / propagate
    for (int m = 0; m < NG; m++) begin
      gg[m] = 1'b0;
      gp[m] = 1'b1;
      for (int t = 0; t < GROUP; t++) begin
        gg[m] = g[m*GROUP+t] | (p[m*GROUP+t] & gg[m]);
        gp[m] = gp[m] & p[m*GROUP+t];
      end
    end

    // second level: carry into group m as a sum of products
    for (int m = 0; m <= NG; m++) begin
      logic term;
      gc[m] = 1'b0;
      for (int l = 0; l < m; l++) begin
        term = gg[l];
        for (int q = l + 1; q < m; q++) term = term & gp[q];
        gc[m] = gc[m] | term;
      end
      term = cin;
      for (int q = 0; q < m; q++) term = term & gp[q];
      gc[m] = gc[m] | term;
    end

    // first level: carry into each bit of a group from the group carry-in
    for (int m = 0; m < NG; m++) begin
      for (int t = 0; t < GROUP; t++) begin
        logic term;
        c[m*GROUP+t] = 1'b0;
        for (int l = 0; l < t; l++) begin
          term = g[m*GROUP+l];
          for (int q = l + 1; q < t; q++) term = term & p[m*GROUP+q];
          c[m*GROUP+t] = c[m*GROUP+t] | term;
        end
        term = gc[m];
        for (int q = 0; q < t; q++) term = term & p[m*GROUP+q];
        c[m*GROUP+t] = c[m*GROUP+t] | term;
      end
    end
    c[W] = gc[NG];

    s    = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
