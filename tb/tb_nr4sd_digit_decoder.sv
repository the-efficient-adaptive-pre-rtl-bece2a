// tb_nr4sd_digit_decoder -- exhaustive check of the stored-bits to selection
// signal decoders of both digit sets: exactly the digit's signal is raised.
module tb_nr4sd_digit_decoder;
  import nr4sd_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       n_hi, n_lo;
  nr4sd_sel_t sm, sp;

  nr4sd_digit_decoder #(.MODE(NR4SD_MINUS)) u_minus (.n_hi(n_hi), .n_lo(n_lo), .sel(sm));
  nr4sd_digit_decoder #(.MODE(NR4SD_PLUS))  u_plus  (.n_hi(n_hi), .n_lo(n_lo), .sel(sp));

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
    for (int r = 0; r < 4; r++) begin
      int dm, dp;
      {n_hi, n_lo} = 2'(r);
      #1;
      dm = -2 * int'(n_hi) + int'(n_lo);
      dp =  2 * int'(n_hi) - int'(n_lo);
      check(sm.one_p == (dm == 1) && sm.one_m == (dm == -1) && sm.two == (dm == -2),
            $sformatf("NR4SD- bits %02b -> %b", r, sm));
      check(sp.one_p == (dp == 1) && sp.one_m == (dp == -1) && sp.two == (dp == 2),
            $sformatf("NR4SD+ bits %02b -> %b", r, sp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
