// vfe_sequencer: readout sequence generator for the VFE-PCB control lines.
//
// One readout cycle holds the 18 channels of every front-end chip and clocks
// them one by one onto the chips' output lines, where the readout digitises
// them. The sequence, in order:
//   1. Start. In physics mode the start is the rising edge of the external
//      trigger (synchronised to clk). A calibration cycle starts on cal_start
//      and raises the TCALIB lines selected by cal_bank for TCAL_W cycles.
//   2. After hold_delay+1 clk cycles from the start (from the first cycle
//      TCALIB is high when calibrating), HOLD rises. One clk cycle (10 ns at
//      100 MHz) is the delay step, which meets the required adjustment step
//      of 10 ns or less.
//   3. After HOLD_TO_RST cycles, RESET pulses for RST_W cycles to clear the
//      chips' shift registers.
//   4. After RST_TO_SRIN cycles SRIN rises, SRIN_LEAD cycles before the first
//      CLOCK rising edge. SRIN falls with the first CLOCK falling edge, so it
//      overlaps the first clock and is low before the first ADC sample.
//   5. 18 CLOCK periods of CLK_HIGH + CLK_LOW cycles (5 MHz at 100 MHz).
//      SAMPLE_AT cycles after each rising edge, adc_sample pulses for one
//      cycle with adc_chan set to the channel now on the output lines.
//   6. After the last period plus TAIL cycles HOLD falls, done pulses.
// ENABLE1-6 are taken from enable_groups at the start and held constant
// through the cycle.
//
// SROUT check: srout_all (the AND of all shift register outputs in use) must
// be low at the samples of channels 0-16 and high at that of channel 17.
// seq_error is set otherwise and stays set until the next start.
//
// Latency: a trigger edge reaches the state machine after three clk edges
// (two synchroniser stages and an edge detector), so HOLD rises
// hold_delay+3 cycles after the first clk edge that sees the trigger high.
// A start while busy is ignored.
//
// The order of the lines, the 18 clocks, the SRIN overlap rule, the 5 MHz
// limit and the 10 ns adjustment follow the interface specification. The
// clk frequency, every duration parameter and the SROUT check are this
// design's choices.
module vfe_sequencer
  import ecal_pkg::*;
#(
  parameter int unsigned CLK_MHZ     = 100,
  parameter int unsigned DLY_W       = 12,
  parameter int unsigned TCAL_W      = 4,
  parameter int unsigned HOLD_TO_RST = 10,
  parameter int unsigned RST_W       = 10,
  parameter int unsigned RST_TO_SRIN = 10,
  parameter int unsigned SRIN_LEAD   = 10,
  parameter int unsigned CLK_HIGH    = 10,
  parameter int unsigned CLK_LOW     = 10,
  parameter int unsigned SAMPLE_AT   = 18,
  parameter int unsigned TAIL        = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  trigger,
  input  logic                  cal_start,
  input  logic [N_BANK:1]       cal_bank,
  input  logic [N_GROUPS:1]     enable_groups,
  input  logic [DLY_W-1:0]      hold_delay,
  input  logic                  srout_all,
  output vfe_ctrl_t             ctrl,
  output logic                  adc_sample,
  output logic [CHAN_W-1:0]     adc_chan,
  output logic                  busy,
  output logic                  done,
  output logic                  seq_error
);

  localparam int unsigned PERIOD = CLK_HIGH + CLK_LOW;
  localparam int unsigned CNT_W  = 16;

  // The shift register clock must not exceed 5 MHz: period >= 200 ns.
  initial begin
    assert (PERIOD * 1000 >= 200 * CLK_MHZ)
      else $error("CLOCK period of %0d cycles exceeds 5 MHz", PERIOD);
    assert (SAMPLE_AT > CLK_HIGH && SAMPLE_AT < PERIOD)
      else $error("ADC sample must fall after SRIN goes low, within the period");
  end

  typedef enum logic [2:0] {
    S_IDLE, S_DELAY, S_HOLD, S_RESET, S_GAP, S_LEAD, S_CLOCK, S_TAIL
  } state_e;

  state_e            state;
  logic [CNT_W-1:0]  cnt;
  logic [DLY_W-1:0]  dly;
  logic [CNT_W-1:0]  tcal_cnt;
  logic [CHAN_W-1:0] chan;
  logic [2:0]        trig_sync;
  logic              trig_rise;

  assign trig_rise = trig_sync[1] & ~trig_sync[2];
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig_sync <= '0;
    else        trig_sync <= {trig_sync[1:0], trigger};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      dly        <= '0;
      tcal_cnt   <= '0;
      chan       <= '0;
      ctrl       <= '0;
      adc_sample <= 1'b0;
      adc_chan   <= '0;
      done       <= 1'b0;
      seq_error  <= 1'b0;
    end else begin
      adc_sample <= 1'b0;
      done       <= 1'b0;

      // Calibration strobe width, independent of the state machine.
      if (tcal_cnt != 0) begin
        tcal_cnt <= tcal_cnt - 1'b1;
        if (tcal_cnt == 1) ctrl.tcalib <= '0;
      end

      // SROUT check at every ADC sample.
      if (adc_sample && (srout_all != (adc_chan == CHAN_W'(N_CHAN - 1))))
        seq_error <= 1'b1;

      unique case (state)
        S_IDLE: begin
          ctrl.enable <= enable_groups;
          if (cal_start || trig_rise) begin
            state       <= S_DELAY;
            dly         <= hold_delay;
            seq_error   <= 1'b0;
            ctrl.enable <= enable_groups;
            if (cal_start) begin
              ctrl.tcalib <= cal_bank;
              tcal_cnt    <= CNT_W'(TCAL_W);
            end
          end
        end
        S_DELAY: begin
          if (dly == 0) begin
            ctrl.hold <= 1'b1;
            state     <= S_HOLD;
            cnt       <= CNT_W'(HOLD_TO_RST - 1);
          end else begin
            dly <= dly - 1'b1;
          end
        end
        S_HOLD: begin
          if (cnt == 0) begin
            ctrl.reset <= 1'b1;
            state      <= S_RESET;
            cnt        <= CNT_W'(RST_W - 1);
          end else cnt <= cnt - 1'b1;
        end
        S_RESET: begin
          if (cnt == 0) begin
            ctrl.reset <= 1'b0;
            state      <= S_GAP;
            cnt        <= CNT_W'(RST_TO_SRIN - 1);
          end else cnt <= cnt - 1'b1;
        end
        S_GAP: begin
          if (cnt == 0) begin
            ctrl.srin <= 1'b1;
            state     <= S_LEAD;
            cnt       <= CNT_W'(SRIN_LEAD - 1);
          end else cnt <= cnt - 1'b1;
        end
        S_LEAD: begin
          if (cnt == 0) begin
            ctrl.clock <= 1'b1;
            state      <= S_CLOCK;
            chan       <= '0;
            cnt        <= '0;
          end else cnt <= cnt - 1'b1;
        end
        S_CLOCK: begin
          // cnt is the phase: cycles since the last rising CLOCK edge.
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(CLK_HIGH - 1)) begin
            ctrl.clock <= 1'b0;
            if (chan == 0) ctrl.srin <= 1'b0;
          end
          if (cnt == CNT_W'(SAMPLE_AT - 1)) begin
            adc_sample <= 1'b1;
            adc_chan   <= chan;
          end
          if (cnt == CNT_W'(PERIOD - 1)) begin
            if (chan == CHAN_W'(N_CHAN - 1)) begin
              state <= S_TAIL;
              cnt   <= CNT_W'(TAIL - 1);
            end else begin
              chan       <= chan + 1'b1;
              ctrl.clock <= 1'b1;
              cnt        <= '0;
            end
          end
        end
        S_TAIL: begin
          if (cnt == 0) begin
            ctrl.hold <= 1'b0;
            done      <= 1'b1;
            state     <= S_IDLE;
          end else cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // SRIN must be high at the first CLOCK rising edge and low at the first
  // ADC sample.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_LEAD && cnt == 0) |-> ctrl.srin);
  assert property (@(posedge clk) disable iff (!rst_n)
                   adc_sample |-> !ctrl.srin);

endmodule
