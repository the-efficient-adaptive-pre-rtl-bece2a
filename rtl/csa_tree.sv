// csa_tree -- Wallace-style carry-save adder tree.
//
// Reduces N_OPS operands of W bits to a sum row and a carry row whose total
// equals the sum of the operands modulo 2^W. Each level groups the rows in
// threes and replaces every group by a row of full adders (3:2 counters):
// the sum word a^b^c and the carry word maj(a,b,c) shifted left by one;
// rows left over are passed to the next level unchanged. The number of rows
// per level is computed at elaboration. The published design names a CSA tree but
// not its arrangement; this grouping is this design's choice.
// Combinational, no carry-propagating adder inside.
module csa_tree #(
  parameter int unsigned N_OPS = 10,
  parameter int unsigned W     = 32
) (
  input  logic [W-1:0] ops [N_OPS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Rows present at the input of level 'lvl'.
  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned c;
    c = N_OPS;
    for (int unsigned l = 0; l < lvl; l++) begin
      c = (c / 3) * 2 + (c % 3);
    end
    return c;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned c;
    int unsigned l;
    c = N_OPS;
    l = 0;
    while (c > 2) begin
      c = (c / 3) * 2 + (c % 3);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned C = rows_at(l);
    localparam int unsigned G = C / 3;
    logic [W-1:0] cur [N_OPS];   // rows entering this level
    logic [W-1:0] nxt [N_OPS];   // rows leaving it (first rows_at(l+1) used)
    if (l == 0) begin : g_first
      assign cur = ops;
    end else begin : g_later
      assign cur = g_level[l-1].nxt;
    end
    for (genvar g = 0; g < G; g++) begin : g_fa
      logic [W-1:0] x, y, z;
      assign x = cur[3*g];
      assign y = cur[3*g+1];
      assign z = cur[3*g+2];
      assign nxt[2*g]   = x ^ y ^ z;
      assign nxt[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
    end
    for (genvar r = 0; r < C % 3; r++) begin : g_pass
      assign nxt[2*G+r] = cur[3*G+r];
    end
    for (genvar u = 2*G + C % 3; u < N_OPS; u++) begin : g_unused
      assign nxt[u] = '0;
    end
  end

  if (LEVELS == 0) begin : g_no_tree
    assign sum   = ops[0];
    assign carry = (N_OPS > 1) ? ops[N_OPS - 1] : '0;
  end else begin : g_out
    assign sum   = g_level[LEVELS-1].nxt[0];
    assign carry = g_level[LEVELS-1].nxt[1];
  end

endmodule
