// tb_nr4sd_coeff_rom -- checks the pre-encoded coefficient ROM: reset value,
// one-cycle synchronous read of every address, hold while the enable is low,
// and contents equal to a reference recoding of the coefficient table. Runs
// the default 16 x 16-bit ROM of both digit sets and a 5-entry 8-bit ROM
// holding the worked-example values.
module tb_nr4sd_coeff_rom;
  import nr4sd_pkg::*;

  localparam int COEFFS16 [16] = '{5, 10, 7, -128, -102, 89, 127, -32768,
                                   32767, -1, 0, 1, 21845, -21846, 12345, -4321};
  localparam int COEFFS8 [5]   = '{-128, -102, 89, 127, -1};

  int checks = 0;
  int failures = 0;

  logic        clk = 0;
  logic        rst;
  logic        cen;
  logic [3:0]  addr;
  logic [2:0]  addr8;
  logic [16:0] dm, dp;
  logic [8:0]  d8;

  always #5 clk = ~clk;

  nr4sd_coeff_rom #(.MODE(NR4SD_MINUS)) u_m (
    .clk(clk), .rst(rst), .cen(cen), .addr(addr), .dout(dm));
  nr4sd_coeff_rom #(.MODE(NR4SD_PLUS)) u_p (
    .clk(clk), .rst(rst), .cen(cen), .addr(addr), .dout(dp));
  nr4sd_coeff_rom #(.MODE(NR4SD_PLUS), .N(8), .DEPTH(5), .COEFFS(COEFFS8)) u_8 (
    .clk(clk), .rst(rst), .cen(cen), .addr(addr8), .dout(d8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cen = 0; addr = '0; addr8 = '0;
    @(posedge clk); @(posedge clk);
    #1;
    check(dm == '0 && dp == '0 && d8 == '0, "reset clears the output");
    rst = 0;
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      addr8 = 3'(i % 8);
      cen = 1;
      @(posedge clk);
      #1;
      check(dm == ref_encode(COEFFS16[i], 16, 0), $sformatf("NR4SD- entry %0d = %b", i, dm));
      check(dp == ref_encode(COEFFS16[i], 16, 1), $sformatf("NR4SD+ entry %0d = %b", i, dp));
      if (i % 8 < 5)
        check(d8 == 9'(ref_encode(COEFFS8[i % 8], 8, 1)), $sformatf("8-bit entry %0d", i % 8));
      else
        check(d8 == '0, "address beyond the table reads zero");
      // enable low: the output must hold whatever the address does
      cen = 0;
      addr = 4'(i + 5);
      @(posedge clk);
      #1;
      check(dm == ref_encode(COEFFS16[i], 16, 0), "hold while cen = 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
