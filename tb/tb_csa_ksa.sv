// End-to-end self-checking testbench of the carry select adder csa_ksa at
// its default width (8 bits), with no parameter changed.
//
// Every one of the 2^16 operand pairs is run through one enable period:
// en = 1 (the adder computes a + b + 1 and the latches take it), then
// en = 0 (the adder recomputes a + b while the latches hold a + b + 1).
// In the en = 0 phase the output is read with sel = 0 and with sel = 1 and
// compared with integer addition. The testbench counts how often each
// mechanism of the design was exercised and fails if one never was:
//   capture      latches taking the cin = 1 result during en = 1
//   hold         latched result read back through the mux while the adder
//                shows a different (cin = 0) result
//   live         cin = 0 result selected straight from the adder
//   cout_select  carry out decided by the selection line (a + b = 2^N - 1)
module tb_csa_ksa;
  import ksa_pkg::*;
  localparam int unsigned N = KSA_WIDTH;

  logic [N-1:0] a, b, sum;
  logic         en, sel, cout;
  int checks = 0, failures = 0;
  int n_capture = 0, n_hold = 0, n_live = 0, n_cout_select = 0;

  csa_ksa dut (.a(a), .b(b), .en(en), .sel(sel), .sum(sum), .cout(cout));

  task automatic expect_result(input int unsigned exp, input string what);
    checks++;
    if ({cout, sum} !== (N+1)'(exp)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%0d b=%0d sel=%b en=%b: got %0d expected %0d",
                 what, a, b, sel, en, {cout, sum}, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en  = 1'b0;
    sel = 1'b0;
    a   = '0;
    b   = '0;
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      int unsigned r0, r1;
      {a, b} = v[2*N-1:0];
      r0 = int'(a) + int'(b);
      r1 = r0 + 1;
      // high phase of the enable clock: cin = 1, latches transparent
      en  = 1'b1;
      sel = 1'($urandom);
      #2;
      expect_result(r1, "en=1");
      n_capture++;
      // low phase: cin = 0, latches hold
      en = 1'b0;
      #1;
      sel = 1'b1;
      #1;
      expect_result(r1, "hold");
      n_hold++;
      sel = 1'b0;
      #1;
      expect_result(r0, "live");
      n_live++;
      if (r0[N] != r1[N]) n_cout_select++;
      #1;
    end
    $display("mechanisms: capture=%0d hold=%0d live=%0d cout_select=%0d",
             n_capture, n_hold, n_live, n_cout_select);
    if (n_capture == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_live == 0) failures++;
    if (n_cout_select == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
