// nr4sd_top -- the two proposed pre-encoded multipliers side by side.
//
// One nr4sd_mult_system uses the NR4SD- digit set {-2,-1,0,+1} and the other
// the NR4SD+ digit set {-1,0,+1,+2}; both use a Modified Booth most
// significant digit. They are alternative designs and share only clock and
// reset: each has its own enable, address, multiplicand and product port.
// Each holds a 16-entry ROM of 16-bit coefficients (4-bit address, 16-bit
// multiplicand, 32-bit product, as in the published simulations). The
// first three coefficients of each ROM are the ones its simulation example
// multiplies by; the rest of the contents are this design's choice.
// Timing: see nr4sd_mult_system (product registered one clock after the inputs
// are sampled, one product per cycle).
module nr4sd_top
  import nr4sd_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH),
  parameter int          COEFFS_MINUS [DEPTH] = '{5, 10, 7, -128, -102, 89, 127, -32768,
                                                  32767, -1, 0, 1, 21845, -21846, 12345, -4321},
  parameter int          COEFFS_PLUS  [DEPTH] = '{10, 20, 25, -128, -102, 89, 127, -32768,
                                                  32767, -1, 0, 1, 21845, -21846, 12345, -4321}
) (
  input  logic              clk,
  input  logic              rst,
  // NR4SD- multiplier
  input  logic              m_cen,
  input  logic [ADDR_W-1:0] m_addr,
  input  logic [N-1:0]      m_a,
  output logic [2*N-1:0]    m_p,
  output logic              m_p_valid,
  // NR4SD+ multiplier
  input  logic              p_cen,
  input  logic [ADDR_W-1:0] p_addr,
  input  logic [N-1:0]      p_a,
  output logic [2*N-1:0]    p_p,
  output logic              p_p_valid
);

  nr4sd_mult_system #(
    .MODE(NR4SD_MINUS), .N(N), .DEPTH(DEPTH), .ADDR_W(ADDR_W), .COEFFS(COEFFS_MINUS)
  ) u_minus (
    .clk(clk), .rst(rst), .cen(m_cen), .addr(m_addr), .a(m_a),
    .p(m_p), .p_valid(m_p_valid)
  );

  nr4sd_mult_system #(
    .MODE(NR4SD_PLUS), .N(N), .DEPTH(DEPTH), .ADDR_W(ADDR_W), .COEFFS(COEFFS_PLUS)
  ) u_plus (
    .clk(clk), .rst(rst), .cen(p_cen), .addr(p_addr), .a(p_a),
    .p(p_p), .p_valid(p_p_valid)
  );

endmodule
