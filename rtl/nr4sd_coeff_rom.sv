// nr4sd_coeff_rom -- ROM of coefficients pre-encoded in NR4SD- or NR4SD+ form.
//
// The coefficients are given as the parameter COEFFS in plain 2's complement
// (each entry is truncated to N bits). For every entry an nr4sd_word_encoder
// runs on the constant value, so the table holds (N+1)-bit pre-encoded words
// and synthesis reduces the encoders to constants: the coefficients are
// encoded offline, as the design intends, without a hand-written table.
//
// Interface and timing: synchronous read. On a rising clock edge with cen = 1
// the word at addr is loaded into dout, which is valid from that edge on;
// with cen = 0 dout holds. The published design shows the ROM with CEn, Addr and
// Clock inputs and one coefficient per cycle; the active-high enable, the
// synchronous active-high reset (clearing dout to the code of zero) and the
// default contents are this design's choices.
module nr4sd_coeff_rom
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
  output logic [N:0]        dout
);

  logic [N:0] table_q [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_entry
    localparam logic [N-1:0] COEF = N'(COEFFS[i]);
    nr4sd_word_encoder #(.MODE(MODE), .N(N)) u_enc (
      .b  (COEF),
      .enc(table_q[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout <= '0;
    end else if (cen) begin
      dout <= (32'(addr) < DEPTH) ? table_q[addr] : '0;
    end
  end

endmodule
