// tb_ecal_readout_system: end-to-end test of a readout board with its cards.
//
// Three connector pairs: pairs 0 and 2 carry a fully-populated card, pair 1 a
// left and a right half-populated card. Random channel charges are applied,
// physics and calibration cycles are run, and at every ADC sample strobe all
// 36 ADC inputs are compared with the charge of the sampled channel, plus the
// calibration level (saturated) where the chip's bank was strobed and the
// channel's group enabled. The charges are changed right after HOLD rises, so
// only held levels can pass. Also checked: the trigger-to-done latency, the
// card IDs, seq_error staying low, and that a start while busy is ignored.
//
// Every mechanism must occur at least once: physics cycle, calibration of
// bank 1, of bank 2 and of both, samples from a half pair and from a full
// pair, saturation of an injected level, an ignored start, and two different
// HOLD delays.
module tb_ecal_readout_system;
  import ecal_pkg::*;

  localparam int unsigned NP = 3;
  localparam logic [NP-1:0] HALF = 3'b010;

  logic        clk = 0, rst_n = 1, trigger = 0, cal_start = 0;
  logic [2:1]  cal_bank = '0;
  logic [6:1]  enable_groups = '0;
  logic [11:0] hold_delay = '0;
  ana_t        vcalib = '0;
  ana_t        charge [NP][N_CHIPS][N_CHAN];
  logic        adc_sample, busy, done, seq_error;
  logic [4:0]  adc_chan;
  ana_t        adc_in [NP][N_CHIPS];
  logic [5:0]  board_id [NP][2];

  ecal_readout_system #(.N_PAIRS(NP), .PAIR_HALF(HALF)) dut (
    .clk, .rst_n, .trigger, .cal_start, .cal_bank, .enable_groups, .hold_delay,
    .vcalib, .charge, .adc_sample, .adc_chan, .adc_in, .board_id, .busy, .done,
    .seq_error);

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  ana_t   expected [NP][N_CHIPS][N_CHAN];
  int     n_samples;
  longint cyc = 0;
  longint t_done;
  // Mechanism counters.
  int m_physics, m_cal_b1, m_cal_b2, m_cal_both, m_half, m_full, m_sat,
      m_ignored, m_delay_a, m_delay_b;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done) t_done = cyc;
    if (adc_sample) begin
      n_samples++;
      for (int i = 0; i < NP; i++)
        for (int n = 0; n < N_CHIPS; n++) begin
          check(adc_in[i][n] == expected[i][n][adc_chan],
                $sformatf("pair %0d OUTPUT%0d channel %0d: %0d expected %0d", i, n + 1,
                          adc_chan, adc_in[i][n], expected[i][n][adc_chan]));
          if (HALF[i]) m_half++; else m_full++;
        end
    end
  end

  // Charges change as soon as HOLD has frozen them.
  always @(posedge dut.ctrl.hold)
    for (int i = 0; i < NP; i++)
      for (int n = 0; n < N_CHIPS; n++)
        for (int c = 0; c < N_CHAN; c++) charge[i][n][c] = ana_t'($urandom);

  task automatic run_cycle(bit cal, logic [2:1] bank, logic [6:1] en, ana_t vc, int dly);
    longint t_start;
    for (int i = 0; i < NP; i++)
      for (int n = 0; n < N_CHIPS; n++)
        for (int c = 0; c < N_CHAN; c++) begin
          int sum;
          charge[i][n][c] = ana_t'($urandom);
          sum = int'(charge[i][n][c]);
          if (cal && bank[n / 6 + 1] && en[c / 3 + 1]) begin
            sum += int'(vc);
            if (sum > 16383) begin sum = 16383; m_sat++; end
          end
          expected[i][n][c] = ana_t'(sum);
        end
    vcalib = vc;
    enable_groups = en;
    cal_bank = bank;
    hold_delay = 12'(dly);
    n_samples = 0;
    @(negedge clk);
    t_start = cyc;
    if (cal) cal_start = 1; else trigger = 1;
    @(negedge clk);
    cal_start = 0;
    repeat (50) @(negedge clk);
    trigger = 0;
    // A second start during the cycle must change nothing.
    repeat (20) @(negedge clk);
    cal_start = 1;
    @(negedge clk);
    cal_start = 0;
    m_ignored++;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    // Monitor stamps are one cycle late; the trigger adds 2 synchroniser
    // cycles over cal_start.
    check(t_done - t_start == longint'(dly) + (cal ? 411 : 413) + 1,
          $sformatf("start to done %0d cycles", t_done - t_start));
    check(n_samples == 18, "18 samples per cycle");
    check(!seq_error, "SROUT check passed");
    if (!cal) m_physics++;
    else if (bank == 2'b01) m_cal_b1++;
    else if (bank == 2'b10) m_cal_b2++;
    else if (bank == 2'b11) m_cal_both++;
    if (dly == 0) m_delay_a++; else m_delay_b++;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NP; i++)
      for (int n = 0; n < N_CHIPS; n++)
        for (int c = 0; c < N_CHAN; c++) charge[i][n][c] = '0;
    #1 rst_n = 0;      // a real falling edge for the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(board_id[0][0] == 1 && board_id[0][1] == 0, "IDs of full pair 0");
    check(board_id[1][0] == 3 && board_id[1][1] == 4, "IDs of half pair 1");
    check(board_id[2][0] == 5, "ID of full pair 2");
    run_cycle(0, 2'b00, 6'b111111, 14'd0, 0);
    run_cycle(1, 2'b01, 6'b000101, 14'd3000, 17);
    run_cycle(1, 2'b10, 6'b111000, 14'd12000, 0);
    run_cycle(1, 2'b11, 6'($urandom), 14'($urandom), 250);
    run_cycle(0, 2'b00, 6'b000000, 14'd8000, 9);
    check(m_physics > 0, "physics cycle ran");
    check(m_cal_b1 > 0,  "bank 1 calibration ran");
    check(m_cal_b2 > 0,  "bank 2 calibration ran");
    check(m_cal_both > 0, "both-bank calibration ran");
    check(m_half > 0,    "half pair sampled");
    check(m_full > 0,    "full pair sampled");
    check(m_sat > 0,     "saturated injection");
    check(m_ignored > 0, "start while busy");
    check(m_delay_a > 0 && m_delay_b > 0, "two HOLD delays");
    $display("mechanisms: physics=%0d cal_b1=%0d cal_b2=%0d cal_both=%0d half=%0d full=%0d sat=%0d ignored=%0d",
             m_physics, m_cal_b1, m_cal_b2, m_cal_both, m_half, m_full, m_sat, m_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
