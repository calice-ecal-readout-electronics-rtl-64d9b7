// ecal_readout_system: one readout board with the VFE-PCBs on its cables.
//
// The board has N_PAIRS connector pairs. Pair i carries either one
// fully-populated VFE-PCB (PAIR_HALF[i] = 0) or a left and a right
// half-populated VFE-PCB (PAIR_HALF[i] = 1); either way it brings twelve
// multiplexed channel outputs, one per front-end chip, to twelve ADC inputs.
// With all eight pairs full the board reads 8 x 12 x 18 = 1728 channels.
//
// One vfe_sequencer drives the same control lines into every connector, so
// all chips are held together and clocked out in step: each adc_sample pulse
// marks the moment when adc_in[i][n] carries channel adc_chan of chip n+1 on
// pair i, for every i and n at once. The SROUT lines of all cards are ANDed
// and checked by the sequencer.
//
// Interface:
//   clk, rst_n        100 MHz system clock, asynchronous active-low reset
//   trigger           physics start (asynchronous, rising edge)
//   cal_start         calibration start (one clk pulse); cal_bank picks the
//                     TCALIB lines, enable_groups the calibration groups
//   hold_delay        start-to-HOLD delay in clk cycles
//   vcalib            calibration level (from the board's calibration source)
//   charge[i][n][c]   shaped signal of channel c of chip n+1 behind pair i
//   adc_in[i][n]      levels to be digitised, valid at adc_sample
//   board_id[i][k]    identification lines of the card on connector A (k=0)
//                     or B (k=1); a full pair has no card on B and reads 0
// The ADC and the calibration level source are outside this design; their
// signals are ports.
//
// The board size, the full-or-two-halves pairs and the shared control lines
// follow the interface specification. One sequencer for the whole board and
// the card ID values (2i+k+1) are this design's choices.
module ecal_readout_system
  import ecal_pkg::*;
#(
  parameter int unsigned         N_PAIRS   = 8,
  parameter logic [N_PAIRS-1:0]  PAIR_HALF = '0,
  parameter int unsigned         DLY_W     = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trigger,
  input  logic              cal_start,
  input  logic [N_BANK:1]   cal_bank,
  input  logic [N_GROUPS:1] enable_groups,
  input  logic [DLY_W-1:0]  hold_delay,
  input  ana_t              vcalib,
  input  ana_t              charge   [N_PAIRS][N_CHIPS][N_CHAN],
  output logic              adc_sample,
  output logic [CHAN_W-1:0] adc_chan,
  output ana_t              adc_in   [N_PAIRS][N_CHIPS],
  output logic [ID_W-1:0]   board_id [N_PAIRS][2],
  output logic              busy,
  output logic              done,
  output logic              seq_error
);

  vfe_ctrl_t             ctrl;
  logic [N_BANK:1]       pair_srout [N_PAIRS];
  logic                  srout_all;

  vfe_sequencer #(.DLY_W(DLY_W)) u_seq (
    .clk           (clk),
    .rst_n         (rst_n),
    .trigger       (trigger),
    .cal_start     (cal_start),
    .cal_bank      (cal_bank),
    .enable_groups (enable_groups),
    .hold_delay    (hold_delay),
    .srout_all     (srout_all),
    .ctrl          (ctrl),
    .adc_sample    (adc_sample),
    .adc_chan      (adc_chan),
    .busy          (busy),
    .done          (done),
    .seq_error     (seq_error)
  );

  for (genvar i = 0; i < N_PAIRS; i++) begin : g_pair
    conn_down_t      down_a, down_b;
    conn_up_t        up_a, up_b;
    logic [N_BANK:1] srout_a, srout_b;

    readout_pair_merge u_merge (
      .ctrl      (ctrl),
      .vcalib    (vcalib),
      .half_mode (PAIR_HALF[i]),
      .down_a    (down_a),
      .down_b    (down_b),
      .up_a      (up_a),
      .up_b      (up_b),
      .srout_a   (srout_a),
      .srout_b   (srout_b),
      .adc_in    (adc_in[i]),
      .srout     (pair_srout[i])
    );

    if (PAIR_HALF[i]) begin : g_half
      // Chip slots 7-12 of the pair sit on the right card, in its bank 2.
      vfe_pcb #(.FLAVOUR(FLAV_LEFT), .BOARD_ID(ID_W'(2*i+1))) u_left (
        .down   (down_a),
        .charge (charge[i]),
        .up     (up_a),
        .srout  (srout_a),
        .id     (board_id[i][0])
      );
      vfe_pcb #(.FLAVOUR(FLAV_RIGHT), .BOARD_ID(ID_W'(2*i+2))) u_right (
        .down   (down_b),
        .charge (charge[i]),
        .up     (up_b),
        .srout  (srout_b),
        .id     (board_id[i][1])
      );
    end else begin : g_full
      vfe_pcb #(.FLAVOUR(FLAV_FULL), .BOARD_ID(ID_W'(2*i+1))) u_full (
        .down   (down_a),
        .charge (charge[i]),
        .up     (up_a),
        .srout  (srout_a),
        .id     (board_id[i][0])
      );
      assign up_b           = '0;
      assign srout_b        = '0;
      assign board_id[i][1] = '0;
    end
  end

  always_comb begin
    srout_all = 1'b1;
    for (int unsigned i = 0; i < N_PAIRS; i++)
      srout_all &= &pair_srout[i];
  end

endmodule
