// Self-checking testbench of carry_gen_cell: applies all 16 input
// combinations. The expected group generate is worked out from its meaning:
// the two-bit group generates a carry when the upper part generates one, or
// propagates one that the lower part generates. The group propagates when
// both parts propagate.
module tb_carry_gen_cell;
  logic p_hi, g_hi, p_lo, g_lo, pro, gen;
  int checks = 0, failures = 0;

  carry_gen_cell dut (.p_hi(p_hi), .g_hi(g_hi), .p_lo(p_lo), .g_lo(g_lo),
                      .pro(pro), .gen(gen));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {p_hi, g_hi, p_lo, g_lo} = v[3:0];
      #1;
      // carry out of the group with carry in 0: generated somewhere and
      // not stopped on its way up
      exp_g = g_hi ? 1'b1 : (p_hi ? g_lo : 1'b0);
      exp_p = (p_hi == 1'b1) && (p_lo == 1'b1);
      checks++;
      if (gen !== exp_g || pro !== exp_p) begin
        failures++;
        $display("FAIL in=%b gen=%b pro=%b expected %b %b", v[3:0], gen, pro, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
