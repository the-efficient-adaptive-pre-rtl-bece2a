// tb_mb_ppg -- checks the Modified Booth partial product generator (16-bit
// multiplicand) for the five digits -2..+2 and random multiplicands: with the
// top bit re-inverted, x + cin must equal A * digit, and the zero digit must
// give no carry-in.
module tb_mb_ppg;
  import nr4sd_pkg::*;

  localparam int N = 16;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] a;
  mb_sel_t      sel;
  logic [N:0]   pp;
  logic         cin;

  mb_ppg #(.N(N)) dut (.a(a), .sel(sel), .pp(pp), .cin(cin));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint pp_value(input logic [N:0] p, input logic c);
    logic [N:0] x;
    x = p ^ (17'(1) << N);
    return longint'($signed(x)) + longint'(c);
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
        sel = '{s: (d < 0), two: (d == 2 || d == -2), one: (d == 1 || d == -1)};
        #1;
        check(pp_value(pp, cin) == longint'(av) * d,
              $sformatf("A=%0d d=%0d got %0d", av, d, pp_value(pp, cin)));
        if (d == 0) check(cin == 1'b0, "zero digit gives no carry-in");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
