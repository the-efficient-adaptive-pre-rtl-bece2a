// tb_mb_msd_encoder -- exhaustive check of the Modified Booth encoder of the
// most significant digit: recoded digit per triplet as in the Booth table,
// and the sign forced to 0 for the all-ones triplet.
module tb_mb_msd_encoder;
  import nr4sd_pkg::*;

  int checks = 0;
  int failures = 0;

  logic    b_hi, b_lo, c_in;
  mb_sel_t sel;

  mb_msd_encoder dut (.b_hi(b_hi), .b_lo(b_lo), .c_in(c_in), .sel(sel));

  localparam int DIGIT [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

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
      int d, mag;
      {b_hi, b_lo, c_in} = 3'(r);
      #1;
      d = DIGIT[r];
      mag = d < 0 ? -d : d;
      check(sel.one == (mag == 1), $sformatf("one, triplet %03b", r));
      check(sel.two == (mag == 2), $sformatf("two, triplet %03b", r));
      check(sel.s == (d < 0), $sformatf("s, triplet %03b", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
