// mb_ppg -- partial product generator for the Modified Booth encoded most
// significant digit of a pre-encoded NR4SD coefficient.
//
//   p_{k-1,i} = (one & a_i | two & a_{i-1}) ^ s,  i = 0..N,
// with a_{-1} = 0 and a_N = a_{N-1}. cin = s (s is 0 for the zero digit of
// the all-ones triplet, so s alone marks a negative digit). As in nr4sd_ppg
// the top bit is returned inverted. The gate-level form is this design's
// own. Combinational.
module mb_ppg
  import nr4sd_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  mb_sel_t      sel,
  output logic [N:0]   pp,
  output logic         cin
);

  logic [N:0] a_ext;
  logic [N:0] a_sh;
  logic [N:0] p;

  always_comb begin
    a_ext = {a[N-1], a};
    a_sh  = {a, 1'b0};
    for (int i = 0; i <= N; i++) begin
      p[i] = ((sel.one & a_ext[i]) | (sel.two & a_sh[i])) ^ sel.s;
    end
    pp  = {~p[N], p[N-1:0]};
    cin = sel.s;
  end

endmodule
