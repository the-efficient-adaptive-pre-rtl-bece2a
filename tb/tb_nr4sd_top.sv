// tb_nr4sd_top -- end-to-end test of the two pre-encoded multipliers at their
// default size (16-bit operands, 16-entry ROMs, no parameter overridden).
//
// Both systems are driven independently: first the published simulation
// examples (NR4SD-: 20*5, 30*10, 34*7; NR4SD+: 10*10, 20*20, 30*25), then a
// long random stream over every ROM address with the enable dropped at
// random, a reset in the middle, and a stall check. Every product is compared
// with a * coefficient from the test's own copy of the coefficient tables,
// and is expected on the clock edge after the one that samples its inputs.
//
// Mechanisms counted (each must occur at least once): every low-digit value
// of each digit set and every most-significant Booth digit value, all taken
// from a reference recoding of the coefficients used; the all-ones Booth
// triplet whose sign is forced to 0; back-to-back operations; stalls with
// the enable low; a reset during operation.
module tb_nr4sd_top;
  import nr4sd_pkg::*;

  localparam int COEFFS_M [16] = '{5, 10, 7, -128, -102, 89, 127, -32768,
                                   32767, -1, 0, 1, 21845, -21846, 12345, -4321};
  localparam int COEFFS_P [16] = '{10, 20, 25, -128, -102, 89, 127, -32768,
                                   32767, -1, 0, 1, 21845, -21846, 12345, -4321};

  int checks = 0;
  int failures = 0;

  logic        clk = 0;
  logic        rst;
  logic        m_cen, p_cen;
  logic [3:0]  m_addr, p_addr;
  logic [15:0] m_a, p_a;
  logic [31:0] m_p, p_p;
  logic        m_p_valid, p_p_valid;

  always #5 clk = ~clk;

  nr4sd_top dut (
    .clk(clk), .rst(rst),
    .m_cen(m_cen), .m_addr(m_addr), .m_a(m_a), .m_p(m_p), .m_p_valid(m_p_valid),
    .p_cen(p_cen), .p_addr(p_addr), .p_a(p_a), .p_p(p_p), .p_p_valid(p_p_valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int low_digit_m [int];    // NR4SD- low digit value -> count
  int low_digit_p [int];    // NR4SD+ low digit value -> count
  int msd_digit [int];      // MB top digit value (both systems) -> count
  int forced_sign = 0;      // all-ones top triplet, s forced to 0
  int back_to_back = 0;
  int stalls = 0;
  int resets = 0;

  // Reference recoding; counts the digits of every coefficient used.
  task automatic count_digits(input int b, input bit plus);
    int c;
    int v;
    int d;
    c = 0;
    for (int j = 0; j < 7; j++) begin
      v = 2 * ((b >> (2*j+1)) & 1) + ((b >> (2*j)) & 1) + c;
      if (plus) begin
        d = (v >= 3) ? v - 4 : v;
        c = (v >= 3) ? 1 : 0;
        low_digit_p[d]++;
      end else begin
        d = (v >= 2) ? v - 4 : v;
        c = (v >= 2) ? 1 : 0;
        low_digit_m[d]++;
      end
    end
    v = -2 * ((b >> 15) & 1) + ((b >> 14) & 1) + c;
    msd_digit[v]++;
    if (((b >> 14) & 3) == 3 && c == 1) forced_sign++;
  endtask

  // in-flight expectations of each system: {valid, product}
  typedef struct {
    bit valid;
    int prod;
  } exp_t;
  exp_t mq [$];
  exp_t pq [$];
  bit   m_prev_en = 0;
  bit   p_prev_en = 0;

  task automatic step(input bit me, input int ma_d, input int mav,
                      input bit pe, input int pa_d, input int pav);
    exp_t e;
    m_cen = me; m_addr = 4'(ma_d); m_a = 16'(mav);
    p_cen = pe; p_addr = 4'(pa_d); p_a = 16'(pav);
    mq.push_back('{me, mav * COEFFS_M[ma_d]});
    pq.push_back('{pe, pav * COEFFS_P[pa_d]});
    if (me) count_digits(COEFFS_M[ma_d], 0);
    if (pe) count_digits(COEFFS_P[pa_d], 1);
    if (me && m_prev_en) back_to_back++;
    if (!me || !pe) stalls++;
    m_prev_en = me;
    p_prev_en = pe;
    @(posedge clk);
    #1;
    if (mq.size() > 1) begin
      e = mq.pop_front();
      check(m_p_valid == e.valid, "NR4SD- valid");
      if (e.valid) check($signed(m_p) == e.prod,
                         $sformatf("NR4SD- p = %0d expected %0d", $signed(m_p), e.prod));
    end
    if (pq.size() > 1) begin
      e = pq.pop_front();
      check(p_p_valid == e.valid, "NR4SD+ valid");
      if (e.valid) check($signed(p_p) == e.prod,
                         $sformatf("NR4SD+ p = %0d expected %0d", $signed(p_p), e.prod));
    end
  endtask

  task automatic do_reset();
    rst = 1;
    m_cen = 0; p_cen = 0;
    repeat (2) @(posedge clk);
    #1;
    check(m_p == '0 && p_p == '0 && !m_p_valid && !p_p_valid, "reset clears outputs");
    rst = 0;
    mq.delete();
    pq.delete();
    m_prev_en = 0;
    p_prev_en = 0;
    resets++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int held_m;
    m_addr = '0; p_addr = '0; m_a = '0; p_a = '0;
    do_reset();

    // published examples
    step(1, 0, 20, 1, 0, 10);
    step(1, 1, 30, 1, 1, 20);
    step(1, 2, 34, 1, 2, 30);
    step(0, 0, 0, 0, 0, 0);
    check($signed(m_p) == 238 && $signed(p_p) == 750, "last example products 238 and 750");

    // random streams
    for (int t = 0; t < 20000; t++) begin
      int ma, pa;
      ma = int'($signed(16'($urandom)));
      pa = int'($signed(16'($urandom)));
      if (t % 101 == 0) begin ma = -32768; pa = 32767; end
      step(($urandom % 6) != 0, int'($urandom % 16), ma,
           ($urandom % 6) != 0, int'($urandom % 16), pa);
      if (t == 10000) do_reset();
    end

    // stall: with both enables low the products stay put
    step(1, 13, 12345, 1, 14, -777);
    step(0, 0, 1, 0, 0, 1);
    held_m = $signed(m_p);
    repeat (3) step(0, 5, 3, 0, 6, 3);
    check($signed(m_p) == held_m && held_m == 12345 * COEFFS_M[13], "NR4SD- product held in a stall");
    check($signed(p_p) == -777 * COEFFS_P[14], "NR4SD+ product held in a stall");

    // every mechanism must have happened
    for (int d = -2; d <= 1; d++) begin
      check(low_digit_m.exists(d), $sformatf("NR4SD- digit %0d never used", d));
    end
    for (int d = -1; d <= 2; d++) begin
      check(low_digit_p.exists(d), $sformatf("NR4SD+ digit %0d never used", d));
    end
    for (int d = -2; d <= 2; d++) begin
      check(msd_digit.exists(d), $sformatf("Booth top digit %0d never used", d));
    end
    check(forced_sign > 0, "all-ones Booth triplet never used");
    check(back_to_back > 0, "no back-to-back operations");
    check(stalls > 0, "no stalls");
    check(resets > 1, "no reset during operation");
    $display("mechanisms: NR4SD- digits -2:%0d -1:%0d 0:%0d +1:%0d",
             low_digit_m[-2], low_digit_m[-1], low_digit_m[0], low_digit_m[1]);
    $display("mechanisms: NR4SD+ digits -1:%0d 0:%0d +1:%0d +2:%0d",
             low_digit_p[-1], low_digit_p[0], low_digit_p[1], low_digit_p[2]);
    $display("mechanisms: Booth top digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d, forced sign %0d",
             msd_digit[-2], msd_digit[-1], msd_digit[0], msd_digit[1], msd_digit[2], forced_sign);
    $display("mechanisms: back-to-back %0d, stall cycles %0d, resets %0d",
             back_to_back, stalls, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
