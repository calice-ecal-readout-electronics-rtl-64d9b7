// tb_vfe_pcb: self-checking test of the three VFE-PCB flavours.
//
// A full, a left and a right card share one set of connector levels, driven
// by the test on the pair numbers of the connector table (written out here
// independently of the design's table). Each readout cycle checks, after
// every CLOCK edge, the level on every OUTPUT pair of every card against the
// expected held level; pairs of an unpopulated bank and all other pairs must
// read 0; SROUT1/2 must be the bank ANDs; the ID lines must show BOARD_ID.
// Calibration cycles strobe TCALIB1, TCALIB2 or both to check that each
// strobe reaches only its own bank.
module tb_vfe_pcb;
  import ecal_pkg::*;

  localparam int OUT_PAIR [12] = '{1, 4, 14, 20, 30, 33, 2, 5, 15, 21, 31, 34};
  localparam int EN_PAIR  [6]  = '{10, 11, 12, 16, 17, 18};
  localparam int P_HOLD = 6, P_VCALIB = 7, P_SRIN = 8, P_RESET = 9, P_CLOCK = 13;
  localparam int P_TCAL1 = 25, P_TCAL2 = 26;

  conn_down_t down;
  ana_t       charge [N_CHIPS][N_CHAN];
  conn_up_t   up [3];
  logic [2:1] srout [3];
  logic [5:0] id [3];
  int         checks = 0, failures = 0;

  vfe_pcb #(.FLAVOUR(FLAV_FULL),  .BOARD_ID(6'd11)) u_full  (.down, .charge, .up(up[0]), .srout(srout[0]), .id(id[0]));
  vfe_pcb #(.FLAVOUR(FLAV_LEFT),  .BOARD_ID(6'd22)) u_left  (.down, .charge, .up(up[1]), .srout(srout[1]), .id(id[1]));
  vfe_pcb #(.FLAVOUR(FLAV_RIGHT), .BOARD_ID(6'd33)) u_right (.down, .charge, .up(up[2]), .srout(srout[2]), .id(id[2]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit populated(int card, int chip);  // chip 0..11
    return card == 0 || (card == 1 && chip < 6) || (card == 2 && chip >= 6);
  endfunction

  task automatic readout(logic [2:1] tcal, logic [6:1] en, ana_t vc);
    ana_t expected [N_CHIPS][N_CHAN];
    for (int n = 0; n < N_CHIPS; n++)
      for (int c = 0; c < N_CHAN; c++) begin
        int sum;
        charge[n][c] = ana_t'($urandom);
        sum = int'(charge[n][c]);
        if (tcal[n / 6 + 1] && en[c / 3 + 1]) sum += int'(vc);
        if (sum > 16383) sum = 16383;
        expected[n][c] = ana_t'(sum);
      end
    for (int g = 1; g <= 6; g++) down.dig[EN_PAIR[g-1]] = en[g];
    down.ana[P_VCALIB] = vc;
    if (tcal != 0) begin
      #10 down.dig[P_TCAL1] = tcal[1]; down.dig[P_TCAL2] = tcal[2];
      #10 down.dig[P_TCAL1] = 0;       down.dig[P_TCAL2] = 0;
    end
    #10 down.dig[P_HOLD] = 1;
    #10 down.dig[P_RESET] = 1;
    #10 down.dig[P_RESET] = 0;
    #10 down.dig[P_SRIN] = 1;
    for (int k = 0; k < N_CHAN; k++) begin
      #10 down.dig[P_CLOCK] = 1;
      #5;
      for (int card = 0; card < 3; card++) begin
        for (int n = 0; n < N_CHIPS; n++) begin
          ana_t e = populated(card, n) ? expected[n][k] : '0;
          check(up[card][OUT_PAIR[n]] == e,
                $sformatf("card %0d OUTPUT%0d channel %0d: %0d expected %0d",
                          card, n + 1, k, up[card][OUT_PAIR[n]], e));
        end
        for (int p = 1; p <= 34; p++) begin
          bit is_out = 0;
          for (int n = 0; n < 12; n++) if (OUT_PAIR[n] == p) is_out = 1;
          if (!is_out) check(up[card][p] == '0, $sformatf("card %0d pair %0d idle", card, p));
        end
        check(srout[card][1] == (k == 17 && card != 2), $sformatf("card %0d SROUT1 at %0d", card, k));
        check(srout[card][2] == (k == 17 && card != 1), $sformatf("card %0d SROUT2 at %0d", card, k));
      end
      #5 down.dig[P_CLOCK] = 0;
      down.dig[P_SRIN] = 0;
    end
    #10 down.dig[P_HOLD] = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    down = '0;
    for (int n = 0; n < N_CHIPS; n++) for (int c = 0; c < N_CHAN; c++) charge[n][c] = '0;
    #1 down.dig[P_RESET] = 1;
    #5 down.dig[P_RESET] = 0;
    check(id[0] == 6'd11 && id[1] == 6'd22 && id[2] == 6'd33, "board IDs");
    readout(2'b00, 6'b111111, 14'd4000);
    readout(2'b01, 6'b010101, 14'd2000);
    readout(2'b10, 6'b100110, 14'd9000);
    readout(2'b11, 6'($urandom), 14'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
