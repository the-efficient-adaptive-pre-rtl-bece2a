// tb_nr4sd_ppg -- checks the NR4SD- and NR4SD+ partial product generators
// (16-bit multiplicand) for every digit of each set and random multiplicands:
// with the top bit re-inverted the N+1 bits are a 2's complement number x,
// and x + cin must equal A * digit.
module tb_nr4sd_ppg;
  import nr4sd_pkg::*;

  localparam int N = 16;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] a;
  nr4sd_sel_t   sm, sp;
  logic [N:0]   ppm, ppp;
  logic         cm, cp;

  nr4sd_ppg #(.MODE(NR4SD_MINUS), .N(N)) u_m (.a(a), .sel(sm), .pp(ppm), .cin(cm));
  nr4sd_ppg #(.MODE(NR4SD_PLUS),  .N(N)) u_p (.a(a), .sel(sp), .pp(ppp), .cin(cp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint pp_value(input logic [N:0] pp, input logic cin);
    logic [N:0] x;
    x = pp ^ (17'(1) << N);
    return longint'($signed(x)) + longint'(cin);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int av;
      case (t)
        0: av = -32768;
        1: av = 32767;
        2: av = 0;
        3: av = -1;
        default: av = int'($signed(16'($urandom)));
      endcase
      a = 16'(av);
      for (int d = -2; d <= 2; d++) begin
        if (d >= -2 && d <= 1) begin
          sm = '{one_p: (d == 1), one_m: (d == -1), two: (d == -2)};
          #1;
          check(pp_value(ppm, cm) == longint'(av) * d,
                $sformatf("NR4SD- A=%0d d=%0d got %0d", av, d, pp_value(ppm, cm)));
        end
        if (d >= -1 && d <= 2) begin
          sp = '{one_p: (d == 1), one_m: (d == -1), two: (d == 2)};
          #1;
          check(pp_value(ppp, cp) == longint'(av) * d,
                $sformatf("NR4SD+ A=%0d d=%0d got %0d", av, d, pp_value(ppp, cp)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
