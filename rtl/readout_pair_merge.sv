// readout_pair_merge: readout-board side of one pair of VFE-PCB connectors.
//
// The readout board has sixteen connectors in eight pairs. A pair serves
// either one fully-populated card (on connector A) or two half-populated
// cards, a left one on connector A and a right one on connector B. Either way
// the pair delivers twelve channel outputs, OUTPUT1-12, to twelve ADC inputs:
//   * OUTPUT1-6 always come from connector A;
//   * OUTPUT7-12 come from connector A for a full card and from connector B
//     when half_mode is set.
// The control lines are driven identically on both connectors, each on the
// pair the connector table gives it; a half card simply ignores the TCALIB
// line of the bank it does not carry. The shift register outputs are merged
// the same way: SROUT1 from A, SROUT2 from A (full) or B (half).
//
// Interface: ctrl and vcalib come from the sequencer and the calibration
// level source; adc_in[n] is OUTPUTn+1. Purely combinational.
//
// The eight pairs, the full-or-two-halves rule and the pair assignment follow
// the interface specification; using connector A for a full card is this
// design's choice.
module readout_pair_merge
  import ecal_pkg::*;
(
  input  vfe_ctrl_t         ctrl,
  input  ana_t              vcalib,
  input  logic              half_mode,
  output conn_down_t        down_a,
  output conn_down_t        down_b,
  input  conn_up_t          up_a,
  input  conn_up_t          up_b,
  input  logic [N_BANK:1]   srout_a,
  input  logic [N_BANK:1]   srout_b,
  output ana_t              adc_in [N_CHIPS],
  output logic [N_BANK:1]   srout
);

  conn_down_t down;

  always_comb begin
    down = '0;
    for (int unsigned p = 1; p <= N_CONN_PAIRS; p++) begin
      pin_sig_t s;
      s = full_pair_signal(p);
      case (s.kind)
        SIG_HOLD:   down.dig[p] = ctrl.hold;
        SIG_RESET:  down.dig[p] = ctrl.reset;
        SIG_SRIN:   down.dig[p] = ctrl.srin;
        SIG_CLOCK:  down.dig[p] = ctrl.clock;
        SIG_ENABLE: down.dig[p] = ctrl.enable[s.num];
        SIG_TCALIB: down.dig[p] = ctrl.tcalib[s.num];
        SIG_VCALIB: down.ana[p] = vcalib;
        default: ;
      endcase
    end
  end

  assign down_a = down;
  assign down_b = down;

  always_comb begin
    for (int unsigned n = 1; n <= N_CHIPS; n++) begin
      int unsigned p;
      p = output_pair(n);
      adc_in[n-1] = (half_mode && n > CHIPS_PER_BANK) ? up_b[p] : up_a[p];
    end
  end

  assign srout[1] = srout_a[1];
  assign srout[2] = half_mode ? srout_b[2] : srout_a[2];

endmodule
