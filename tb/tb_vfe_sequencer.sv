// tb_vfe_sequencer: self-checking test of the readout sequence generator.
//
// A monitor records, in clk cycles, every edge of the control lines and every
// ADC sample strobe. For each cycle the test checks:
//   * HOLD rises hold_delay+3 cycles after the trigger is first sampled high,
//     or hold_delay+1 cycles after TCALIB rises when calibrating;
//   * TCALIB carries cal_bank for 4 cycles, and only when calibrating;
//   * one RESET pulse while HOLD is high and before SRIN;
//   * SRIN is high at the first CLOCK rising edge and low at the first sample;
//   * 18 CLOCK periods of 20 cycles (5 MHz at 100 MHz), 10 cycles high;
//   * 18 samples, channels 0..17 in order, each 18 cycles after a rising edge;
//   * HOLD falls 10 cycles after the last period, with done;
//   * ENABLE equals the pattern latched at the start throughout;
//   * seq_error stays low with a correct SROUT and is set by a wrong one.
// A start while busy must be ignored.
module tb_vfe_sequencer;
  import ecal_pkg::*;

  logic        clk = 0, rst_n = 1, trigger = 0, cal_start = 0;
  logic [2:1]  cal_bank = '0;
  logic [6:1]  enable_groups = '0;
  logic [11:0] hold_delay = '0;
  logic        srout_all;
  vfe_ctrl_t   ctrl;
  logic        adc_sample, busy, done, seq_error;
  logic [4:0]  adc_chan;
  int          checks = 0, failures = 0;
  bit          break_srout = 0;

  vfe_sequencer dut (.clk, .rst_n, .trigger, .cal_start, .cal_bank,
                     .enable_groups, .hold_delay, .srout_all, .ctrl,
                     .adc_sample, .adc_chan, .busy, .done, .seq_error);

  always #5 clk = ~clk;

  // Test-side model of the chips' SROUT: high after the 18th CLOCK edge.
  int clk_edges = 0;
  always @(posedge ctrl.clock or posedge ctrl.reset)
    if (ctrl.reset) clk_edges <= 0; else clk_edges <= clk_edges + 1;
  assign srout_all = (clk_edges == 18) ^ break_srout;

  // Monitor.
  longint    cyc = 0;
  vfe_ctrl_t prev;
  longint    t_hold_rise, t_hold_fall, t_tcal_rise, t_tcal_fall, t_rst_rise,
             t_rst_fall, t_srin_rise, t_srin_fall, t_done;
  longint    clk_rise [$];
  longint    clk_fall [$];
  longint    samp_t   [$];
  int        samp_ch  [$];
  int        rst_pulses, tcal_value, enable_changes;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    prev <= ctrl;
    if (ctrl.hold   && !prev.hold)   t_hold_rise = cyc;
    if (!ctrl.hold  && prev.hold)    t_hold_fall = cyc;
    if (ctrl.tcalib != 0 && prev.tcalib == 0) begin t_tcal_rise = cyc; tcal_value = int'(ctrl.tcalib); end
    if (ctrl.tcalib == 0 && prev.tcalib != 0) t_tcal_fall = cyc;
    if (ctrl.reset  && !prev.reset)  begin t_rst_rise = cyc; rst_pulses++; end
    if (!ctrl.reset && prev.reset)   t_rst_fall = cyc;
    if (ctrl.srin   && !prev.srin)   t_srin_rise = cyc;
    if (!ctrl.srin  && prev.srin)    t_srin_fall = cyc;
    if (ctrl.clock  && !prev.clock)  clk_rise.push_back(cyc);
    if (!ctrl.clock && prev.clock)   clk_fall.push_back(cyc);
    if (ctrl.enable != prev.enable && busy) enable_changes++;
    if (adc_sample) begin
      samp_t.push_back(cyc);
      samp_ch.push_back(int'(adc_chan));
      checks++;
      if (ctrl.srin) begin failures++; $display("FAIL: SRIN high at sample"); end
    end
    if (done) t_done = cyc;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_cycle(bit cal, logic [2:1] bank, logic [6:1] en, int dly,
                           bit bad_srout);
    longint t_start;
    clk_rise.delete(); clk_fall.delete(); samp_t.delete(); samp_ch.delete();
    rst_pulses = 0; enable_changes = 0; tcal_value = 0;
    t_tcal_rise = -1;
    break_srout = bad_srout;
    hold_delay = 12'(dly);
    enable_groups = en;
    cal_bank = bank;
    @(negedge clk);
    if (cal) begin
      cal_start = 1;
      @(negedge clk);
      cal_start = 0;
    end else begin
      trigger = 1;
      t_start = cyc;        // first clk edge to sample the trigger high
      @(negedge clk);
    end
    // Change the inputs while busy: nothing may follow them.
    repeat (3) @(negedge clk);
    enable_groups = ~en;
    trigger = 0;
    repeat (3) @(negedge clk);
    cal_start = 1;          // ignored: sequence in progress
    @(negedge clk);
    cal_start = 0;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    if (cal) begin
      check(t_tcal_rise >= 0 && tcal_value == int'(bank), "TCALIB carries cal_bank");
      check(t_tcal_fall - t_tcal_rise == 4, "TCALIB width 4 cycles");
      check(t_hold_rise - t_tcal_rise == longint'(dly) + 1,
            $sformatf("TCALIB to HOLD %0d cycles, expected %0d", t_hold_rise - t_tcal_rise, dly + 1));
    end else begin
      check(t_tcal_rise < 0, "no TCALIB in physics mode");
      // The monitor stamps a registered output one cycle after the edge
      // that set it, hence the extra cycle against t_start.
      check(t_hold_rise - t_start == longint'(dly) + 3 + 1,
            $sformatf("trigger to HOLD %0d cycles, expected %0d", t_hold_rise - t_start - 1, dly + 3));
    end
    check(rst_pulses == 1, "one RESET pulse");
    check(t_rst_rise > t_hold_rise && t_rst_fall < t_srin_rise, "RESET inside HOLD, before SRIN");
    check(clk_rise.size() == 18 && clk_fall.size() == 18, "18 CLOCK pulses");
    check(t_srin_rise < clk_rise[0] && t_srin_fall > clk_rise[0], "SRIN overlaps first CLOCK");
    check(t_srin_fall <= samp_t[0], "SRIN low before first sample");
    for (int k = 0; k < 18; k++) begin
      check(clk_fall[k] - clk_rise[k] == 10, "CLOCK high 10 cycles");
      if (k > 0) check(clk_rise[k] - clk_rise[k-1] == 20, "CLOCK period 20 cycles (5 MHz)");
      check(samp_ch[k] == k, $sformatf("sample %0d channel %0d", k, samp_ch[k]));
      check(samp_t[k] - clk_rise[k] == 18, "sample 18 cycles after CLOCK edge");
    end
    check(samp_t.size() == 18, "18 samples");
    check(t_hold_fall - (clk_rise[17] + 20) == 10, "HOLD falls 10 cycles after last period");
    check(t_done == t_hold_fall, "done with HOLD falling");
    check(enable_changes == 0, "ENABLE constant during the cycle");
    check(seq_error == bad_srout, "SROUT check");
    check(!busy, "idle after done");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;      // a real falling edge for the asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    run_cycle(0, 2'b00, 6'b000000, 0, 0);
    run_cycle(0, 2'b00, 6'b111111, 37, 0);
    run_cycle(1, 2'b01, 6'b000011, 5, 0);
    run_cycle(1, 2'b10, 6'b110000, 100, 0);
    run_cycle(1, 2'b11, 6'b101010, 1, 0);
    run_cycle(0, 2'b00, 6'b000000, 3, 1);
    run_cycle(0, 2'b00, 6'b000000, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
