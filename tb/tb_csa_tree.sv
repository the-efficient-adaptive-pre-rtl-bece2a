// tb_csa_tree -- random check of carry-save trees with 10 (the 16-bit
// multiplier's size), 3, 7 and 2 operands: sum + carry must equal the sum of
// all operands modulo 2^W.
module tb_csa_tree;

  localparam int W = 32;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] o10 [10];
  logic [W-1:0] o3 [3];
  logic [W-1:0] o7 [7];
  logic [W-1:0] o2 [2];
  logic [W-1:0] s10, c10, s3, c3, s7, c7, s2, c2;

  csa_tree #(.N_OPS(10), .W(W)) u10 (.ops(o10), .sum(s10), .carry(c10));
  csa_tree #(.N_OPS(3),  .W(W)) u3  (.ops(o3),  .sum(s3),  .carry(c3));
  csa_tree #(.N_OPS(7),  .W(W)) u7  (.ops(o7),  .sum(s7),  .carry(c7));
  csa_tree #(.N_OPS(2),  .W(W)) u2  (.ops(o2),  .sum(s2),  .carry(c2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
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
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] r10, r3, r7, r2;
      r10 = '0; r3 = '0; r7 = '0; r2 = '0;
      for (int i = 0; i < 10; i++) begin
        o10[i] = (t == 0) ? '1 : $urandom;
        r10 += o10[i];
      end
      for (int i = 0; i < 3; i++) begin
        o3[i] = $urandom;
        r3 += o3[i];
      end
      for (int i = 0; i < 7; i++) begin
        o7[i] = $urandom;
        r7 += o7[i];
      end
      for (int i = 0; i < 2; i++) begin
        o2[i] = $urandom;
        r2 += o2[i];
      end
      #1;
      check(s10 + c10 == r10, $sformatf("10 ops: %h + %h != %h", s10, c10, r10));
      check(s3 + c3 == r3, "3 ops");
      check(s7 + c7 == r7, "7 ops");
      check(s2 + c2 == r2, "2 ops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
