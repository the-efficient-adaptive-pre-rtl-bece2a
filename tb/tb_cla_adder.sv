// tb_cla_adder -- checks the carry-lookahead adder: all operand pairs and
// both carry-ins at 8 bits, random and carry-chain corner cases at 32 bits.
module tb_cla_adder;

  int checks = 0;
  int failures = 0;

  logic [7:0]  x8, y8, s8;
  logic        ci8, co8;
  logic [31:0] x32, y32, s32;
  logic        ci32, co32;

  cla_adder #(.W(8))  u8  (.x(x8),  .y(y8),  .cin(ci8),  .s(s8),  .cout(co8));
  cla_adder #(.W(32)) u32 (.x(x32), .y(y32), .cin(ci32), .s(s32), .cout(co32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x32 = '0; y32 = '0; ci32 = 0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        for (int c = 0; c < 2; c++) begin
          x8 = 8'(i); y8 = 8'(j); ci8 = c[0];
          #1;
          check({co8, s8} == 9'(i + j + c), $sformatf("8-bit %0d+%0d+%0d", i, j, c));
        end
      end
    end
    for (int t = 0; t < 5000; t++) begin
      logic [32:0] r;
      case (t)
        0: begin x32 = '1; y32 = 32'd1; ci32 = 0; end
        1: begin x32 = '1; y32 = '0; ci32 = 1; end
        2: begin x32 = '1; y32 = '1; ci32 = 1; end
        3: begin x32 = 32'h0F0F_0F0F; y32 = 32'hF0F0_F0F1; ci32 = 0; end
        default: begin x32 = $urandom; y32 = $urandom; ci32 = $urandom; end
      endcase
      #1;
      r = 33'(x32) + 33'(y32) + 33'(ci32);
      check({co32, s32} == r, $sformatf("32-bit %h+%h+%0d", x32, y32, ci32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
