// Self-checking testbench of mux_bank: random inputs and both select values;
// every output bit must come from d1 when sel = 1 and from d0 when sel = 0.
module tb_mux_bank;
  localparam int unsigned W = 9;
  logic         sel;
  logic [W-1:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux_bank #(.W(W)) dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sel = 1'($urandom);
      d0  = W'($urandom);
      d1  = W'($urandom);
      #1;
      for (int k = 0; k < W; k++) begin
        checks++;
        if (y[k] !== (sel ? d1[k] : d0[k])) begin
          failures++;
          $display("FAIL bit %0d sel=%b d0=%h d1=%h y=%h", k, sel, d0, d1, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
