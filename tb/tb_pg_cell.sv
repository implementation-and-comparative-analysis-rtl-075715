// Self-checking testbench of pg_cell: applies all four input pairs and
// compares pro and gen with the half-adder truth table (pro is the sum bit,
// gen the carry bit of a + b).
module tb_pg_cell;
  logic a, b, pro, gen;
  int checks = 0, failures = 0;

  pg_cell dut (.a(a), .b(b), .pro(pro), .gen(gen));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [1:0] s;
      {a, b} = v[1:0];
      #1;
      s = 2'(int'(a) + int'(b));   // {carry, sum} of a + b
      checks++;
      if (pro !== s[0] || gen !== s[1]) begin
        failures++;
        $display("FAIL a=%b b=%b pro=%b gen=%b expected %b %b", a, b, pro, gen, s[0], s[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
