// nr4sd_word_encoder -- pre-encodes an N-bit 2's complement coefficient into
// the (N+1)-bit stored NR4SD- or NR4SD+ form.
//
// A chain of K-1 nr4sd_digit_cell slices (K = N/2) starts with carry c_0 = 0
// and recodes the bit pairs from the least significant end; the carry
// c_{2k-2} left over enters the Modified Booth encoder of the most
// significant digit together with b_{2k-1} and b_{2k-2}. This is the
// word-level converter of the NR4SD encoding scheme. Output layout:
//   enc[2j+1:2j] = {n_{2j+1}, n_{2j}}, j = 0..K-2 ;  enc[N:N-2] = {s, two, one}
// In the multiplier system it is applied to constant coefficients, so it is
// the "offline" encoding: synthesis folds it into the ROM contents.
// Combinational. N must be even and at least 4.
module nr4sd_word_encoder
  import nr4sd_pkg::*;
#(
  parameter nr4sd_mode_e MODE = NR4SD_MINUS,
  parameter int unsigned N    = 16
) (
  input  logic [N-1:0] b,     // 2's complement coefficient
  output logic [N:0]   enc    // pre-encoded coefficient
);

  localparam int unsigned K = N / 2;

  logic [K-1:0] carry;        // carry[j] = c_{2j}
  mb_sel_t      msd;

  assign carry[0] = 1'b0;

  for (genvar j = 0; j < K - 1; j++) begin : g_digit
    logic c_next;
    nr4sd_digit_cell #(.MODE(MODE)) u_cell (
      .b_hi (b[2*j+1]),
      .b_lo (b[2*j]),
      .c_in (carry[j]),
      .n_hi (enc[2*j+1]),
      .n_lo (enc[2*j]),
      .c_out(c_next)
    );
    assign carry[j+1] = c_next;
  end

  mb_msd_encoder u_msd (
    .b_hi(b[N-1]),
    .b_lo(b[N-2]),
    .c_in(carry[K-1]),
    .sel (msd)
  );

  assign enc[N:N-2] = msd;

endmodule
