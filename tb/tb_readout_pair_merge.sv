// tb_readout_pair_merge: self-checking test of the readout side of one
// connector pair.
//
// Drives random control levels and checks each on its connector-table pair
// of both connectors (all other digital pairs low, VCALIB on its pair only).
// Drives random levels on every pair of both connectors and checks that the
// twelve ADC inputs take OUTPUT1-12 from connector A for a full card, and
// OUTPUT7-12 from connector B in half mode; likewise SROUT2.
module tb_readout_pair_merge;
  import ecal_pkg::*;

  localparam int OUT_PAIR [12] = '{1, 4, 14, 20, 30, 33, 2, 5, 15, 21, 31, 34};
  localparam int EN_PAIR  [6]  = '{10, 11, 12, 16, 17, 18};

  vfe_ctrl_t  ctrl;
  ana_t       vcalib;
  logic       half_mode;
  conn_down_t down_a, down_b;
  conn_up_t   up_a, up_b;
  logic [2:1] srout_a, srout_b, srout;
  ana_t       adc_in [N_CHIPS];
  int         checks = 0, failures = 0;

  readout_pair_merge dut (.ctrl, .vcalib, .half_mode, .down_a, .down_b, .up_a,
                          .up_b, .srout_a, .srout_b, .adc_in, .srout);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [34:1] exp_dig;
      ctrl      = vfe_ctrl_t'($urandom);
      vcalib    = ana_t'($urandom);
      half_mode = t[0];
      srout_a   = 2'($urandom);
      srout_b   = 2'($urandom);
      for (int p = 1; p <= 34; p++) begin
        up_a[p] = ana_t'($urandom);
        up_b[p] = ana_t'($urandom);
      end
      #1;
      exp_dig = '0;
      exp_dig[6]  = ctrl.hold;
      exp_dig[8]  = ctrl.srin;
      exp_dig[9]  = ctrl.reset;
      exp_dig[13] = ctrl.clock;
      exp_dig[25] = ctrl.tcalib[1];
      exp_dig[26] = ctrl.tcalib[2];
      for (int g = 1; g <= 6; g++) exp_dig[EN_PAIR[g-1]] = ctrl.enable[g];
      check(down_a.dig == exp_dig, $sformatf("connector A levels %h vs %h", down_a.dig, exp_dig));
      check(down_b.dig == exp_dig, "connector B levels");
      for (int p = 1; p <= 34; p++) begin
        ana_t e;
        e = (p == 7) ? vcalib : '0;
        check(down_a.ana[p] == e && down_b.ana[p] == e, $sformatf("analogue pair %0d", p));
      end
      for (int n = 0; n < 12; n++) begin
        ana_t e;
        e = (half_mode && n >= 6) ? up_b[OUT_PAIR[n]] : up_a[OUT_PAIR[n]];
        check(adc_in[n] == e, $sformatf("ADC input %0d half=%0b", n, half_mode));
      end
      check(srout[1] == srout_a[1], "SROUT1 from A");
      check(srout[2] == (half_mode ? srout_b[2] : srout_a[2]), "SROUT2 merge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
