// vfe_calib_select: calibration channel selection of one front-end chip.
//
// The 18 channels are divided into six groups of three; each ENABLE line
// selects one group, bitwise, and the same selection applies to every chip on
// the board. The chip's bank strobe TCALIB fires the injection: on its rising
// edge the channels of the enabled groups are marked as injected. The marks
// stay until the shift register RESET that starts the following readout clears
// them, so the sample taken on HOLD in between includes the calibration pulse.
//
// Interface: enable[g] selects group g (1..6); group g holds channels
// 3(g-1) .. 3(g-1)+2. armed[c] is high for an injected channel c.
//
// The six groups of three channels, the bitwise selection and the per-bank
// strobe follow the interface specification. Which three channels form a
// group and the clearing by RESET are this design's choice.
module vfe_calib_select #(
  parameter int unsigned N_CHAN   = 18,
  parameter int unsigned N_GROUPS = 6
) (
  input  logic                tcalib,
  input  logic                reset,
  input  logic [N_GROUPS:1]   enable,
  output logic [N_CHAN-1:0]   armed
);

  localparam int unsigned GSIZE = N_CHAN / N_GROUPS;

  logic [N_CHAN-1:0] mask;

  always_comb begin
    for (int unsigned c = 0; c < N_CHAN; c++)
      mask[c] = enable[c / GSIZE + 1];
  end

  always_ff @(posedge tcalib or posedge reset) begin
    if (reset) armed <= '0;
    else       armed <= mask;
  end

endmodule
