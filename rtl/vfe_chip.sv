// vfe_chip: behavioural model of one 18-channel front-end readout chip.
//
// This is a behavioural model, not a circuit: the real chip is analogue
// (preamplifier, shaper, sample-and-hold and analogue multiplexer). Here each
// analogue level is an unsigned ANA_W-bit number, so the model simulates and
// synthesises like digital logic while keeping the real chip's pins.
//
// What it does:
//   * charge[c] is the shaped signal of channel c as it reaches the
//     sample-and-hold; the rising edge of HOLD freezes all 18 channels.
//     A channel whose calibration injection was armed (see vfe_calib_select)
//     holds charge + vcalib, saturated to full scale.
//   * The readout shift register (vfe_shift_mux) selects one held channel per
//     CLOCK edge; out carries that level, or 0 (the baseline) while no
//     channel is selected.
//   * srout is high while the token sits in the last stage.
//
// Timing: out follows the selection combinationally, i.e. it settles right
// after each rising CLOCK edge; the readout samples it later in the period.
//
// The channel count, the single multiplexed output, HOLD, the calibration
// input and the group/bank selection follow the interface specification.
// The additive injection model and the zero baseline are this design's own.
module vfe_chip
  import ecal_pkg::*;
(
  input  ana_t                 charge [N_CHAN],
  input  logic                 hold,
  input  logic                 reset,
  input  logic                 srin,
  input  logic                 clock,
  input  logic                 tcalib,
  input  logic [N_GROUPS:1]    enable,
  input  ana_t                 vcalib,
  output ana_t                 out,
  output logic                 srout
);

  logic [N_CHAN-1:0] sel;
  logic [N_CHAN-1:0] armed;
  ana_t              held [N_CHAN];

  vfe_shift_mux #(.N_CHAN(N_CHAN)) u_shift (
    .clock (clock),
    .reset (reset),
    .srin  (srin),
    .sel   (sel),
    .srout (srout)
  );

  vfe_calib_select #(.N_CHAN(N_CHAN), .N_GROUPS(N_GROUPS)) u_cal (
    .tcalib (tcalib),
    .reset  (reset),
    .enable (enable),
    .armed  (armed)
  );

  // Sample-and-hold, with the injected pulse added to armed channels.
  always_ff @(posedge hold) begin
    for (int unsigned c = 0; c < N_CHAN; c++) begin
      logic [ANA_W:0] sum;
      sum = {1'b0, charge[c]} + (armed[c] ? {1'b0, vcalib} : '0);
      held[c] <= sum[ANA_W] ? '1 : sum[ANA_W-1:0];
    end
  end

  // Analogue multiplexer: the token is one-hot, so an AND-OR is a select.
  always_comb begin
    out = '0;
    for (int unsigned c = 0; c < N_CHAN; c++)
      if (sel[c]) out = out | held[c];
  end

endmodule
