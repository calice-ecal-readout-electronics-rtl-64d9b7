// tb_vfe_calib_select: self-checking test of the calibration group selection.
//
// For random ENABLE patterns, fires TCALIB and checks that exactly the three
// channels of every enabled group are armed, that a later change of ENABLE
// does not disturb the armed set, and that RESET clears it.
module tb_vfe_calib_select;
  logic        tcalib = 0, reset = 0;
  logic [6:1]  enable = '0;
  logic [17:0] armed;
  int          checks = 0, failures = 0;

  vfe_calib_select dut (.tcalib, .reset, .enable, .armed);

  function automatic logic [17:0] expect_mask(logic [6:1] en);
    logic [17:0] m = '0;
    for (int g = 1; g <= 6; g++)
      if (en[g]) m |= 18'b111 << (3 * (g - 1));
    return m;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (armed=%b)", what, armed);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:1] en;
    #1 reset = 1;
    #5 reset = 0;
    check(armed == '0, "cleared after reset");
    // Every single group, then random patterns.
    for (int t = 0; t < 40; t++) begin
      en = (t < 6) ? (6'b1 << t) : 6'($urandom);
      enable = en;
      #5 tcalib = 1;
      #5 tcalib = 0;
      check(armed == expect_mask(en), $sformatf("groups %b armed", en));
      enable = ~en;
      #5;
      check(armed == expect_mask(en), "armed set kept after ENABLE change");
      #5 reset = 1;
      #5 reset = 0;
      check(armed == '0, "RESET clears armed set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
