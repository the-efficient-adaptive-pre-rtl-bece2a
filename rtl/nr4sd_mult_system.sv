// nr4sd_mult_system -- one pre-encoded NR4SD multiplier with its coefficient
// ROM: P = A * COEFFS[addr].
//
// The ROM holds the coefficients pre-encoded (N+1 bits each) and delivers
// one per clock; the multiplicand is registered alongside so that both reach
// the combinational nr4sd_multiplier together, and the product is
// registered at the output.
//
// Timing (this design's choice; the published design gives one coefficient per
// clock cycle and no latency): inputs a and addr are sampled at a rising
// edge with cen = 1; the product appears on p, with p_valid = 1, two edges
// later. A new operation can start every cycle. With cen = 0 the ROM output
// and the A register hold, and p_valid drops one cycle later.
// rst is synchronous and active high; it clears all registers.
module nr4sd_mult_system
  import nr4sd_pkg::*;
#(
  parameter nr4sd_mode_e MODE   = NR4SD_MINUS,
  parameter int unsigned N      = 16,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH),
  parameter int          COEFFS [DEPTH] = '{5, 10, 7, -128, -102, 89, 127, -32768,
                                            32767, -1, 0, 1, 21845, -21846, 12345, -4321}
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cen,
  input  logic [ADDR_W-1:0] addr,
  input  logic [N-1:0]      a,
  output logic [2*N-1:0]    p,
  output logic              p_valid
);

  logic [N:0]     enc_q;
  logic [N-1:0]   a_q;
  logic           v_q;
  logic [2*N-1:0] prod;

  nr4sd_coeff_rom #(
    .MODE(MODE), .N(N), .DEPTH(DEPTH), .ADDR_W(ADDR_W), .COEFFS(COEFFS)
  ) u_rom (
    .clk (clk),
    .rst (rst),
    .cen (cen),
    .addr(addr),
    .dout(enc_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= cen;
      if (cen) a_q <= a;
    end
  end

  nr4sd_multiplier #(.MODE(MODE), .N(N)) u_mult (
    .a  (a_q),
    .enc(enc_q),
    .p  (prod)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      p       <= '0;
      p_valid <= 1'b0;
    end else begin
      p       <= prod;
      p_valid <= v_q;
    end
  end

endmodule
