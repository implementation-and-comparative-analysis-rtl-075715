// Self-checking testbench of ksa. The 8-bit adder (default width) is tested
// exhaustively: all 2^17 combinations of a, b and cin, compared with integer
// addition. Two more instances, 5 and 16 bits wide, check the tree for a
// width that is not a power of two and for four prefix levels with random
// operands.
module tb_ksa;
  logic [7:0]  a8, b8, s8;
  logic [4:0]  a5, b5, s5;
  logic [15:0] a16, b16, s16;
  logic        cin, co8, co5, co16;
  int checks = 0, failures = 0;

  ksa                dut8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(co8));
  ksa #(.N(5))       dut5  (.a(a5),  .b(b5),  .cin(cin), .sum(s5),  .cout(co5));
  ksa #(.N(16))      dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      int unsigned r8, r5, r16;
      {cin, a8, b8} = v[16:0];
      a5  = 5'($urandom);
      b5  = 5'($urandom);
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      #1;
      r8  = int'(a8)  + int'(b8)  + int'(cin);
      r5  = int'(a5)  + int'(b5)  + int'(cin);
      r16 = int'(a16) + int'(b16) + int'(cin);
      checks++;
      if ({co8, s8} !== r8[8:0]) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d+%0d+%0d -> %0d", a8, b8, cin, {co8, s8});
      end
      if ((v & 7) == 0) begin
        checks += 2;
        if ({co5, s5} !== r5[5:0]) begin
          failures++;
          if (failures < 10) $display("FAIL N=5 %0d+%0d+%0d -> %0d", a5, b5, cin, {co5, s5});
        end
        if ({co16, s16} !== r16[16:0]) begin
          failures++;
          if (failures < 10) $display("FAIL N=16 %0d+%0d+%0d -> %0d", a16, b16, cin, {co16, s16});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
