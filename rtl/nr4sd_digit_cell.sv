// nr4sd_digit_cell -- converts one radix-4 digit of a 2's complement number
// into NR4SD- or NR4SD+ form (one slice of the word-level converter).
//
// Two chained half adders take the bit pair {b_{2j+1}, b_{2j}} and the
// incoming carry c_{2j}:
//   NR4SD- : HA  at bit 2j   : c_{2j+1} = b_{2j} & c_{2j},  n+_{2j} = b_{2j} ^ c_{2j}
//            HA* at bit 2j+1 : c_{2j+2} = b_{2j+1} | c_{2j+1}, n-_{2j+1} = b_{2j+1} ^ c_{2j+1}
//            digit = -2*n_{2j+1} + n_{2j}  in {-2,-1,0,+1}
//   NR4SD+ : HA* at bit 2j   : c_{2j+1} = b_{2j} | c_{2j},  n-_{2j} = b_{2j} ^ c_{2j}
//            HA  at bit 2j+1 : c_{2j+2} = b_{2j+1} & c_{2j+1}, n+_{2j+1} = b_{2j+1} ^ c_{2j+1}
//            digit = +2*n_{2j+1} - n_{2j}  in {-1,0,+1,+2}
// HA* is the half adder with a negatively weighted sum: 2c - s = x + y.
// In both cases 2*b_{2j+1} + b_{2j} + c_{2j} = 4*c_{2j+2} + digit.
// The equations and the ordering of HA/HA* follow the published NR4SD-
// algorithm and its digit-level block diagrams; the NR4SD+ HA* equations are
// those of the NR4SD- HA* (they are published once, for NR4SD-). Purely combinational.
module nr4sd_digit_cell
  import nr4sd_pkg::*;
#(
  parameter nr4sd_mode_e MODE = NR4SD_MINUS
) (
  input  logic b_hi,    // b_{2j+1}
  input  logic b_lo,    // b_{2j}
  input  logic c_in,    // c_{2j}
  output logic n_hi,    // n_{2j+1}
  output logic n_lo,    // n_{2j}
  output logic c_out    // c_{2j+2}
);

  logic c_mid;          // c_{2j+1}

  always_comb begin
    if (MODE == NR4SD_MINUS) begin
      c_mid = b_lo & c_in;      // HA
      n_lo  = b_lo ^ c_in;
      c_out = b_hi | c_mid;     // HA*
      n_hi  = b_hi ^ c_mid;
    end else begin
      c_mid = b_lo | c_in;      // HA*
      n_lo  = b_lo ^ c_in;
      c_out = b_hi & c_mid;     // HA
      n_hi  = b_hi ^ c_mid;
    end
  end

endmodule
