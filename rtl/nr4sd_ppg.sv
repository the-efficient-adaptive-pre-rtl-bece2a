// nr4sd_ppg -- partial product generator for one NR4SD- or NR4SD+ digit.
//
// From the multiplicand A (N bits, 2's complement) and the digit's selection
// signals it forms the N+1 bits p_{j,i} of A*digit in one's complement:
//   p_{j,i} = ((one+ | one-) & a_i | two & a_{i-1}) ^ neg,  i = 0..N,
// with a_{-1} = 0 and a_N = a_{N-1}; neg = two- | one- for NR4SD- and
// neg = one- for NR4SD+. The carry-in cin = neg completes the two's
// complement negation; it is added in the correction row. The top bit is
// returned inverted (the sign-extension-free form PP_j = ~p_{j,N}*2^N + ...),
// which the constant part of the correction term compensates.
// The equations of cin follow the published design; the gate-level form of
// the generator is this design's own, as no gate-level form of it is
// available. Combinational.
module nr4sd_ppg
  import nr4sd_pkg::*;
#(
  parameter nr4sd_mode_e MODE = NR4SD_MINUS,
  parameter int unsigned N    = 16
) (
  input  logic [N-1:0] a,
  input  nr4sd_sel_t   sel,
  output logic [N:0]   pp,    // {~p_{j,N}, p_{j,N-1} .. p_{j,0}}
  output logic         cin    // cin_j
);

  logic [N:0] a_ext;          // a_ext[i] = a_i, a_N = a_{N-1}
  logic [N:0] a_sh;           // a_sh[i] = a_{i-1}, a_{-1} = 0
  logic       neg;
  logic [N:0] p;

  always_comb begin
    a_ext = {a[N-1], a};
    a_sh  = {a, 1'b0};
    neg   = (MODE == NR4SD_MINUS) ? (sel.two | sel.one_m) : sel.one_m;
    for (int i = 0; i <= N; i++) begin
      p[i] = (((sel.one_p | sel.one_m) & a_ext[i]) | (sel.two & a_sh[i])) ^ neg;
    end
    pp  = {~p[N], p[N-1:0]};
    cin = neg;
  end

endmodule
