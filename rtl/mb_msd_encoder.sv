// mb_msd_encoder -- Modified Booth encoder for the most significant digit of
// a pre-encoded NR4SD coefficient.
//
// The triplet is {b_{2k-1}, b_{2k-2}, c_{2k-2}}, where c_{2k-2} is the carry
// out of the NR4SD digit chain; its value is -2*b_{2k-1} + b_{2k-2} + c_{2k-2}
// in {-2..+2}. Outputs follow Table 1 of Modified Booth recoding:
//   one = |digit| is 1, two = |digit| is 2,
//   s   = b_{2k-1} ^ (b_{2k-1} & b_{2k-2} & c_{2k-2})
// The sign equation is the reduced-switching form that gives s = 0 for the
// all-ones triplet (digit 0). 'one' and 'two' are derived from Table 1.
// Purely combinational.
module mb_msd_encoder
  import nr4sd_pkg::*;
(
  input  logic    b_hi,   // b_{2k-1}
  input  logic    b_lo,   // b_{2k-2}
  input  logic    c_in,   // c_{2k-2}
  output mb_sel_t sel
);

  always_comb begin
    sel.one = b_lo ^ c_in;
    sel.two = (b_hi & ~b_lo & ~c_in) | (~b_hi & b_lo & c_in);
    sel.s   = b_hi ^ (b_hi & b_lo & c_in);
  end

endmodule
