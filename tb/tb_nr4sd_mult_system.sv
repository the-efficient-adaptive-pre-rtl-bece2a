// tb_nr4sd_mult_system -- checks one ROM-fed NR4SD- multiplier at its default
// size (16-bit operands, 16 coefficients): the three products of the
// published simulation example (20*5, 30*10, 34*7), a back-to-back stream of
// random operations with the product loaded on the clock edge after the
// one that samples its inputs, hold behaviour with cen low, and reset.
module tb_nr4sd_mult_system;
  import nr4sd_pkg::*;

  localparam int COEFFS [16] = '{5, 10, 7, -128, -102, 89, 127, -32768,
                                 32767, -1, 0, 1, 21845, -21846, 12345, -4321};
  // edges between the one that samples a/addr and the one that loads p
  localparam int LATENCY = 1;

  int checks = 0;
  int failures = 0;

  logic        clk = 0;
  logic        rst;
  logic        cen;
  logic [3:0]  addr;
  logic [15:0] a;
  logic [31:0] p;
  logic        p_valid;

  always #5 clk = ~clk;

  nr4sd_mult_system dut (
    .clk(clk), .rst(rst), .cen(cen), .addr(addr), .a(a), .p(p), .p_valid(p_valid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected products and valid flags, by cycle of issue
  int  exp_q [$];
  bit  vld_q [$];

  // drive inputs for one cycle and record what must come out LATENCY later
  task automatic issue(input bit en, input int ad, input int av);
    cen  = en;
    addr = 4'(ad);
    a    = 16'(av);
    exp_q.push_back(av * COEFFS[ad]);
    vld_q.push_back(en);
    @(posedge clk);
    #1;
    if (exp_q.size() > LATENCY) begin
      int e;
      bit v;
      e = exp_q.pop_front();
      v = vld_q.pop_front();
      check(p_valid == v, $sformatf("p_valid %0d expected %0d", p_valid, v));
      if (v) check($signed(p) == e, $sformatf("p = %0d expected %0d", $signed(p), e));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last;
    rst = 1; cen = 0; addr = '0; a = '0;
    repeat (2) @(posedge clk);
    #1;
    check(p == '0 && p_valid == 1'b0, "reset clears product and valid");
    rst = 0;
    // published example
    issue(1, 0, 20);
    issue(1, 1, 30);
    issue(1, 2, 34);
    issue(0, 2, 0);
    issue(0, 2, 0);
    check($signed(p) == 238, "34 * 7 after the stream");
    // random stream, cen low now and then
    for (int t = 0; t < 2000; t++) begin
      int av;
      av = int'($signed(16'($urandom)));
      if (t % 97 == 0) av = -32768;
      issue(($urandom % 8) != 0, int'($urandom % 16), av);
    end
    // with cen low the ROM and A register hold, so the product repeats
    issue(1, 7, -32768);
    issue(0, 3, 1);
    issue(0, 3, 1);
    last = $signed(p);
    @(posedge clk);
    #1;
    check($signed(p) == last && last == -32768 * COEFFS[7], "product held while cen = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
