// tb_nr4sd_multiplier -- checks the combinational pre-encoded multiplier of
// both digit sets. The coefficient is encoded by a reference model written
// here from the digit rules (an arithmetic recoding, not the gate equations),
// and the product is compared with A * B. 8-bit instances: every A and B.
// 16-bit instances: extremes and random pairs.
module tb_nr4sd_multiplier;
  import nr4sd_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]  a8;
  logic [8:0]  em8, ep8;
  logic [15:0] pm8, pp8;
  logic [15:0] a16;
  logic [16:0] em16, ep16;
  logic [31:0] pm16, pp16;

  nr4sd_multiplier #(.MODE(NR4SD_MINUS), .N(8))  u_m8  (.a(a8),  .enc(em8),  .p(pm8));
  nr4sd_multiplier #(.MODE(NR4SD_PLUS),  .N(8))  u_p8  (.a(a8),  .enc(ep8),  .p(pp8));
  nr4sd_multiplier #(.MODE(NR4SD_MINUS), .N(16)) u_m16 (.a(a16), .enc(em16), .p(pm16));
  nr4sd_multiplier #(.MODE(NR4SD_PLUS),  .N(16)) u_p16 (.a(a16), .enc(ep16), .p(pp16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference pre-encoder: radix-4 recoding digit by digit from the value of
  // each bit pair plus the incoming carry.
  function automatic logic [16:0] ref_encode(input int b, input int n, input bit plus);
    logic [16:0] enc;
    int c;
    int v;
    int d;
    enc = '0;
    c = 0;
    for (int j = 0; j < n / 2 - 1; j++) begin
      v = 2 * ((b >> (2*j+1)) & 1) + ((b >> (2*j)) & 1) + c;
      if (plus) begin
        d = (v >= 3) ? v - 4 : v;
        c = (v >= 3) ? 1 : 0;
        enc[2*j+1] = (d > 0);
      end else begin
        d = (v >= 2) ? v - 4 : v;
        c = (v >= 2) ? 1 : 0;
        enc[2*j+1] = (d < 0);
      end
      enc[2*j] = (d == 1 || d == -1);
    end
    v = -2 * ((b >> (n-1)) & 1) + ((b >> (n-2)) & 1) + c;
    enc[n]   = (v < 0);
    enc[n-1] = (v == 2 || v == -2);
    enc[n-2] = (v == 1 || v == -1);
    return enc;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; em16 = '0; ep16 = '0;
    for (int bv = -128; bv < 128; bv++) begin
      em8 = 9'(ref_encode(bv, 8, 0));
      ep8 = 9'(ref_encode(bv, 8, 1));
      for (int av = -128; av < 128; av++) begin
        a8 = 8'(av);
        #1;
        check($signed(pm8) == 16'(av * bv), $sformatf("NR4SD- 8b %0d*%0d got %0d", av, bv, $signed(pm8)));
        check($signed(pp8) == 16'(av * bv), $sformatf("NR4SD+ 8b %0d*%0d got %0d", av, bv, $signed(pp8)));
      end
    end
    for (int t = 0; t < 20000; t++) begin
      int av, bv;
      av = int'($signed(16'($urandom)));
      bv = int'($signed(16'($urandom)));
      if (t < 4) av = (t[0]) ? 32767 : -32768;
      if (t < 4) bv = (t[1]) ? 32767 : -32768;
      a16 = 16'(av);
      em16 = ref_encode(bv, 16, 0);
      ep16 = ref_encode(bv, 16, 1);
      #1;
      check($signed(pm16) == av * bv, $sformatf("NR4SD- 16b %0d*%0d got %0d", av, bv, $signed(pm16)));
      check($signed(pp16) == av * bv, $sformatf("NR4SD+ 16b %0d*%0d got %0d", av, bv, $signed(pp16)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
