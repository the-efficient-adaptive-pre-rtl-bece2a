// nr4sd_multiplier -- datapath of the pre-encoded NR4SD multiplier.
//
// Computes P = A * B, with A an N-bit 2's complement multiplicand and B a
// coefficient already in the (N+1)-bit stored NR4SD- or NR4SD+ form (see
// nr4sd_pkg for the layout). Structure, K = N/2 digits:
//   - digits 0..K-2: nr4sd_digit_decoder (2 stored bits -> one+/one-/two)
//     feeding an nr4sd_ppg;
//   - digit K-1: its 3 stored MB bits drive an mb_ppg directly;
//   - the K partial products, weighted by 4^j, the row of carry-ins
//     sum(cin_j * 4^j) and the constant 2^N * (1 + sum_j 2^(2j+1)) enter a
//     csa_tree; the constant, 1010...1011 placed at bit N, undoes the
//     inverted top bit of every partial product;
//   - a cla_adder merges the carry-save pair into the 2N-bit product.
// This is eq. (11) of the pre-encoded multiplier scheme; all sums are taken
// modulo 2^(2N), so P is the exact 2N-bit 2's complement product.
// Combinational.
module nr4sd_multiplier
  import nr4sd_pkg::*;
#(
  parameter nr4sd_mode_e MODE = NR4SD_MINUS,
  parameter int unsigned N    = 16
) (
  input  logic [N-1:0]   a,     // multiplicand A, 2's complement
  input  logic [N:0]     enc,   // pre-encoded coefficient B
  output logic [2*N-1:0] p      // A * B, 2's complement
);

  localparam int unsigned K     = N / 2;
  localparam int unsigned N_OPS = K + 2;
  localparam int unsigned W     = 2 * N;

  // 2^N * (1 + sum_{j<K} 2^(2j+1)), modulo 2^W
  function automatic logic [W-1:0] cor_const();
    logic [W-1:0] v;
    v = '0;
    v[N] = 1'b1;
    for (int j = 0; j < K; j++) begin
      if (N + 2*j + 1 < W) v[N + 2*j + 1] = 1'b1;
    end
    return v;
  endfunction

  logic [N:0]   pp  [K];
  logic [K-1:0] cin;
  logic [W-1:0] ops [N_OPS];
  logic [W-1:0] cs_sum, cs_carry;
  logic         unused_cout;

  for (genvar j = 0; j < K - 1; j++) begin : g_nr_digit
    nr4sd_sel_t sel;
    nr4sd_digit_decoder #(.MODE(MODE)) u_dec (
      .n_hi(enc[2*j+1]),
      .n_lo(enc[2*j]),
      .sel (sel)
    );
    nr4sd_ppg #(.MODE(MODE), .N(N)) u_ppg (
      .a  (a),
      .sel(sel),
      .pp (pp[j]),
      .cin(cin[j])
    );
  end

  mb_ppg #(.N(N)) u_msd_ppg (
    .a  (a),
    .sel(mb_sel_t'(enc[N:N-2])),
    .pp (pp[K-1]),
    .cin(cin[K-1])
  );

  always_comb begin
    for (int j = 0; j < K; j++) begin
      ops[j] = W'(pp[j]) << (2*j);
    end
    ops[K] = '0;
    for (int j = 0; j < K; j++) begin
      ops[K][2*j] = cin[j];
    end
    ops[K+1] = cor_const();
  end

  csa_tree #(.N_OPS(N_OPS), .W(W)) u_csa (
    .ops  (ops),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  cla_adder #(.W(W)) u_cla (
    .x   (cs_sum),
    .y   (cs_carry),
    .cin (1'b0),
    .s   (p),
    .cout(unused_cout)
  );

endmodule
