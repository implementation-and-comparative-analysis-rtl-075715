// Self-checking testbench of dlatch_bank. Random data is applied in
// alternating enable phases: while en = 1 the output must follow every
// change of d at once; while en = 0 it must keep the last value seen
// before en fell, whatever d does.
module tb_dlatch_bank;
  localparam int unsigned W = 9;
  logic         en;
  logic [W-1:0] d, q, kept;
  int checks = 0, failures = 0;

  dlatch_bank #(.W(W)) dut (.en(en), .d(d), .q(q));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1;
    d  = '0;
    #1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      // transparent phase: several changes, each seen at q
      en = 1'b1;
      for (int k = 0; k < 3; k++) begin
        d = W'($urandom);
        #1;
        checks++;
        if (q !== d) begin
          failures++;
          $display("FAIL transparent: d=%h q=%h", d, q);
        end
      end
      kept = d;
      // hold phase: d keeps changing, q must not
      en = 1'b0;
      #1;
      for (int k = 0; k < 3; k++) begin
        d = W'($urandom);
        #1;
        checks++;
        if (q !== kept) begin
          failures++;
          $display("FAIL hold: d=%h q=%h expected %h", d, q, kept);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
