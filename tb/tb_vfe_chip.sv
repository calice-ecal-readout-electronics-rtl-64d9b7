// tb_vfe_chip: self-checking test of the front-end chip model.
//
// Runs readout cycles by hand: optional TCALIB strobe, HOLD, RESET, SRIN with
// the first of 18 CLOCK edges. After every edge the multiplexed output must
// carry the held level of the selected channel: the charge at the HOLD edge,
// plus VCALIB (saturated) on channels of enabled groups when calibrating.
// Charges are changed after HOLD to check that the levels are really held.
module tb_vfe_chip;
  import ecal_pkg::*;

  ana_t       charge [N_CHAN];
  logic       hold = 0, reset = 0, srin = 0, clock = 0, tcalib = 0;
  logic [6:1] enable = '0;
  ana_t       vcalib = '0;
  ana_t       out;
  logic       srout;
  int         checks = 0, failures = 0, saturations = 0;

  vfe_chip dut (.charge, .hold, .reset, .srin, .clock, .tcalib, .enable,
                .vcalib, .out, .srout);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic readout(bit cal, logic [6:1] en, ana_t vc);
    ana_t expected [N_CHAN];
    for (int c = 0; c < N_CHAN; c++) charge[c] = ana_t'($urandom);
    enable = en;
    vcalib = vc;
    if (cal) begin
      #10 tcalib = 1;
      #10 tcalib = 0;
    end
    for (int c = 0; c < N_CHAN; c++) begin
      int sum = int'(charge[c]);
      if (cal && en[c / 3 + 1]) sum += int'(vc);
      if (sum > (1 << ANA_W) - 1) begin
        sum = (1 << ANA_W) - 1;
        saturations++;
      end
      expected[c] = ana_t'(sum);
    end
    #10 hold = 1;
    // Inputs move after HOLD; the held levels must not.
    #1 for (int c = 0; c < N_CHAN; c++) charge[c] = ana_t'($urandom);
    #10 reset = 1;
    #10 reset = 0;
    check(out == '0 && !srout, "baseline output after RESET");
    #10 srin = 1;
    for (int k = 0; k < N_CHAN; k++) begin
      #10 clock = 1;
      #5;
      check(out == expected[k],
            $sformatf("channel %0d: out=%0d expected %0d", k, out, expected[k]));
      check(srout == (k == N_CHAN - 1), $sformatf("srout at channel %0d", k));
      #5 clock = 0;
      srin = 0;
    end
    #10 clock = 1;
    #5 check(out == '0 && !srout, "baseline after 19th clock");
    #5 clock = 0;
    #10 hold = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N_CHAN; c++) charge[c] = '0;
    #1 reset = 1;
    #5 reset = 0;
    readout(0, 6'b111111, 14'd3000);      // physics: no injection
    readout(1, 6'b000001, 14'd1000);      // group 1 only
    readout(1, 6'b101010, 14'd5000);
    readout(1, 6'($urandom), 14'($urandom));
    readout(1, 6'b111111, 14'h3FFF);      // forces saturation
    readout(0, 6'b111111, 14'h3FFF);      // injection marks were cleared
    check(saturations > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
