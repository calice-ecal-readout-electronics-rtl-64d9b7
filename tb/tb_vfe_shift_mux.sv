// tb_vfe_shift_mux: self-checking test of the chip readout shift register.
//
// Loads a token with SRIN during the first CLOCK edge and checks, after each
// of the 18 edges, that exactly the expected channel is selected and that
// SROUT is high after the 18th edge only; a 19th edge must empty the
// register. Then checks that RESET clears a register mid-way through.
module tb_vfe_shift_mux;
  localparam int unsigned N = 18;

  logic         clock = 0, reset = 0, srin = 0;
  logic [N-1:0] sel;
  logic         srout;
  int           checks = 0, failures = 0;

  vfe_shift_mux #(.N_CHAN(N)) dut (.clock, .reset, .srin, .sel, .srout);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (sel=%b srout=%b)", what, sel, srout);
    end
  endtask

  task automatic pulse_clock();
    #5 clock = 1;
    #5 clock = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset = 1;
    #5 reset = 0;
    #5;
    check(sel == '0 && !srout, "cleared by reset");
    // Two full passes of the token.
    repeat (2) begin
      srin = 1;
      pulse_clock();
      srin = 0;
      for (int k = 1; k <= N; k++) begin
        check(sel == (N'(1) << (k - 1)), $sformatf("token at channel %0d", k - 1));
        check(srout == (k == N), $sformatf("srout after edge %0d", k));
        if (k < N) pulse_clock();
      end
      pulse_clock();
      check(sel == '0 && !srout, "token shifted out after 19 edges");
      #5 reset = 1;
      #5 reset = 0;
    end
    // Reset in the middle of a pass.
    srin = 1;
    pulse_clock();
    srin = 0;
    repeat (5) pulse_clock();
    check(sel == (N'(1) << 5), "token at channel 5");
    #2 reset = 1;
    #2 reset = 0;
    check(sel == '0, "reset clears mid-pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
