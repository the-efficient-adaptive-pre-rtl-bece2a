// tb_nr4sd_word_encoder -- checks the word-level pre-encoder of both digit
// sets. 8-bit instances: the four worked examples (-128, -102, +89, +127)
// digit by digit, then all 256 inputs. 16-bit instances: extremes and random
// values. For every word the decoded digits must lie in the digit set and
// sum, weighted by 4^j, to the input value.
module tb_nr4sd_word_encoder;
  import nr4sd_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]  b8;
  logic [8:0]  em8, ep8;
  logic [15:0] b16;
  logic [16:0] em16, ep16;

  nr4sd_word_encoder #(.MODE(NR4SD_MINUS), .N(8))  u_m8  (.b(b8),  .enc(em8));
  nr4sd_word_encoder #(.MODE(NR4SD_PLUS),  .N(8))  u_p8  (.b(b8),  .enc(ep8));
  nr4sd_word_encoder #(.MODE(NR4SD_MINUS), .N(16)) u_m16 (.b(b16), .enc(em16));
  nr4sd_word_encoder #(.MODE(NR4SD_PLUS),  .N(16)) u_p16 (.b(b16), .enc(ep16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Digit j of a stored word (layout: 2 bits per low digit, {s,two,one} on top)
  function automatic int digit(input logic [16:0] enc, input int n, input int j, input bit plus);
    if (j == n / 2 - 1) begin
      int mag;
      mag = enc[n-1] ? 2 : (enc[n-2] ? 1 : 0);
      return enc[n] ? -mag : mag;
    end
    if (plus) return 2 * int'(enc[2*j+1]) - int'(enc[2*j]);
    return -2 * int'(enc[2*j+1]) + int'(enc[2*j]);
  endfunction

  task automatic check_word(input logic [16:0] enc, input int n, input int value,
                            input bit plus);
    int sum;
    int w;
    bit in_range;
    begin
      sum = 0;
      w = 1;
      in_range = 1;
      for (int j = 0; j < n / 2; j++) begin
        int d;
        d = digit(enc, n, j, plus);
        sum += d * w;
        w *= 4;
        if (j < n / 2 - 1) begin
          if (plus && (d < -1 || d > 2)) in_range = 0;
          if (!plus && (d < -2 || d > 1)) in_range = 0;
        end
        // the MB field must be a legal code: not both one and two
        if (j == n / 2 - 1 && enc[n-1] && enc[n-2]) in_range = 0;
        // zero carries no sign
        if (j == n / 2 - 1 && !enc[n-1] && !enc[n-2] && enc[n]) in_range = 0;
      end
    end
    check(sum == value && in_range,
          $sformatf("%s N=%0d value %0d -> enc %b decodes to %0d",
                    plus ? "NR4SD+" : "NR4SD-", n, value, enc, sum));
  endtask

  // Digits, most significant first, of the worked examples
  localparam int EX_VAL [4]      = '{-128, -102, 89, 127};
  localparam int EX_MINUS [4][4] = '{'{-2, 0, 0, 0}, '{-1, -2, -1, -2},
                                     '{2, -2, -2, 1}, '{2, 0, 0, -1}};
  localparam int EX_PLUS [4][4]  = '{'{-2, 0, 0, 0}, '{-2, 1, 2, 2},
                                     '{1, 1, 2, 1}, '{2, 0, 0, -1}};

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b16 = '0;
    for (int e = 0; e < 4; e++) begin
      b8 = 8'(EX_VAL[e]);
      #1;
      for (int j = 0; j < 4; j++) begin
        check(digit(17'(em8), 8, 3 - j, 0) == EX_MINUS[e][j],
              $sformatf("example %0d NR4SD- digit %0d", EX_VAL[e], 3 - j));
        check(digit(17'(ep8), 8, 3 - j, 1) == EX_PLUS[e][j],
              $sformatf("example %0d NR4SD+ digit %0d", EX_VAL[e], 3 - j));
      end
    end
    for (int v = -128; v < 128; v++) begin
      b8 = 8'(v);
      #1;
      check_word(17'(em8), 8, v, 0);
      check_word(17'(ep8), 8, v, 1);
    end
    for (int t = 0; t < 3000; t++) begin
      int v;
      case (t)
        0: v = -32768;
        1: v = 32767;
        2: v = -1;
        3: v = 0;
        4: v = 21845;
        5: v = -21846;
        default: v = int'($signed(16'($urandom)));
      endcase
      b16 = 16'(v);
      #1;
      check_word(em16, 16, v, 0);
      check_word(ep16, 16, v, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
