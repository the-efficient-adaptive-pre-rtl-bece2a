// tb_nr4sd_digit_cell -- exhaustive check of one NR4SD- and one NR4SD+
// conversion slice against the rows of the two encoding tables and against
// the identity 2*b_{2j+1} + b_{2j} + c_{2j} = 4*c_{2j+2} + digit.
module tb_nr4sd_digit_cell;
  import nr4sd_pkg::*;

  int checks = 0;
  int failures = 0;

  logic b_hi, b_lo, c_in;
  logic mn_hi, mn_lo, mc_out;
  logic pn_hi, pn_lo, pc_out;

  nr4sd_digit_cell #(.MODE(NR4SD_MINUS)) u_minus (
    .b_hi(b_hi), .b_lo(b_lo), .c_in(c_in), .n_hi(mn_hi), .n_lo(mn_lo), .c_out(mc_out));
  nr4sd_digit_cell #(.MODE(NR4SD_PLUS)) u_plus (
    .b_hi(b_hi), .b_lo(b_lo), .c_in(c_in), .n_hi(pn_hi), .n_lo(pn_lo), .c_out(pc_out));

  // Expected {c_{2j+2}, n_{2j+1}, n_{2j}} per row {b_{2j+1}, b_{2j}, c_{2j}}
  localparam logic [2:0] MINUS_ROWS [8] = '{3'b000, 3'b001, 3'b001, 3'b110,
                                           3'b110, 3'b111, 3'b111, 3'b100};
  localparam logic [2:0] PLUS_ROWS  [8] = '{3'b000, 3'b011, 3'b011, 3'b010,
                                           3'b010, 3'b101, 3'b101, 3'b100};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      int dm, dp;
      {b_hi, b_lo, c_in} = 3'(r);
      #1;
      check({mc_out, mn_hi, mn_lo} == MINUS_ROWS[r],
            $sformatf("NR4SD- row %0d got %b", r, {mc_out, mn_hi, mn_lo}));
      check({pc_out, pn_hi, pn_lo} == PLUS_ROWS[r],
            $sformatf("NR4SD+ row %0d got %b", r, {pc_out, pn_hi, pn_lo}));
      dm = -2 * int'(mn_hi) + int'(mn_lo);
      dp =  2 * int'(pn_hi) - int'(pn_lo);
      check(2 * int'(b_hi) + int'(b_lo) + int'(c_in) == 4 * int'(mc_out) + dm,
            $sformatf("NR4SD- value identity row %0d", r));
      check(2 * int'(b_hi) + int'(b_lo) + int'(c_in) == 4 * int'(pc_out) + dp,
            $sformatf("NR4SD+ value identity row %0d", r));
      check(dm >= -2 && dm <= 1, "NR4SD- digit range");
      check(dp >= -1 && dp <= 2, "NR4SD+ digit range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
