// nr4sd_digit_decoder -- the small circuit each low-order digit needs between
// the ROM and its partial product generator: it turns the two stored bits
// {n_{2j+1}, n_{2j}} into the one-hot selection signals of the digit.
//   NR4SD- (digit = -2*n_{2j+1} + n_{2j}):
//     one+ = ~n_{2j+1} & n_{2j}   one- = n_{2j+1} & n_{2j}   two- = n_{2j+1} & ~n_{2j}
//   NR4SD+ (digit = +2*n_{2j+1} - n_{2j}):
//     one+ = n_{2j+1} & n_{2j}    one- = ~n_{2j+1} & n_{2j}  two+ = n_{2j+1} & ~n_{2j}
// The equations are read off the encoding tables of the two digit sets.
// Combinational.
module nr4sd_digit_decoder
  import nr4sd_pkg::*;
#(
  parameter nr4sd_mode_e MODE = NR4SD_MINUS
) (
  input  logic       n_hi,   // n_{2j+1}
  input  logic       n_lo,   // n_{2j}
  output nr4sd_sel_t sel
);

  always_comb begin
    if (MODE == NR4SD_MINUS) begin
      sel.one_p = ~n_hi &  n_lo;
      sel.one_m =  n_hi &  n_lo;
      sel.two   =  n_hi & ~n_lo;
    end else begin
      sel.one_p =  n_hi &  n_lo;
      sel.one_m = ~n_hi &  n_lo;
      sel.two   =  n_hi & ~n_lo;
    end
  end

endmodule
