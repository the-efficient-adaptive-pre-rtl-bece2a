// nr4sd_pkg -- types shared by the pre-encoded NR4SD multiplier blocks.
//
// A coefficient B of n = 2k bits is recoded into k radix-4 digits. The k-1
// low digits use one of the two non-redundant signed-digit sets
//   NR4SD-  : {-2, -1, 0, +1}   (digit = -2*n_{2j+1} + n_{2j})
//   NR4SD+  : {-1, 0, +1, +2}   (digit = +2*n_{2j+1} - n_{2j})
// and the most significant digit is Modified Booth (MB) encoded, {-2..+2},
// so that the whole 2's complement range is covered. Both variants are
// selected by the nr4sd_mode_e parameter of the blocks.
//
// Stored word layout (n+1 bits, this design's own choice of bit order):
//   [2j+1:2j]  = {n_{2j+1}, n_{2j}}  for digits j = 0 .. k-2
//   [n:n-2]    = {s, two, one}        MB encoding of digit k-1
package nr4sd_pkg;

  typedef enum logic {
    NR4SD_MINUS = 1'b0,   // digit set {-2,-1,0,+1}
    NR4SD_PLUS  = 1'b1    // digit set {-1,0,+1,+2}
  } nr4sd_mode_e;

  // Encoding signals of one NR4SD digit (Tables 2 and 3). 'two' is two-
  // for NR4SD- (weight -2) and two+ for NR4SD+ (weight +2).
  typedef struct packed {
    logic one_p;   // digit is +1
    logic one_m;   // digit is -1
    logic two;     // digit is -2 (NR4SD-) or +2 (NR4SD+)
  } nr4sd_sel_t;

  // Modified Booth encoding signals of one digit (Table 1), sign made 0 for
  // the all-ones triplet as in eq. (12).
  typedef struct packed {
    logic s;       // digit is negative
    logic two;     // |digit| = 2
    logic one;     // |digit| = 1
  } mb_sel_t;

endpackage
