// vfe_pcb: one very-front-end card, in any of its three flavours.
//
// A fully-populated card holds six silicon wafers and twelve 18-channel
// front-end chips (216 channels); a half-populated card holds three wafers and
// the six chips of one bank, the left flavour bank 1 (chips 1-6) and the right
// flavour bank 2 (chips 7-12). The card:
//   * decodes its control lines from the connector pairs given by the
//     connector table (ecal_pkg::pair_signal) and fans them out to the chips.
//     HOLD, RESET, SRIN, CLOCK, ENABLE1-6 and VCALIB go to every chip; TCALIB1
//     goes to bank 1 and TCALIB2 to bank 2;
//   * puts the multiplexed output of chip n on the pair of OUTPUTn. Pairs that
//     the flavour leaves floating read as 0;
//   * forms SROUTb as the AND of the six SROUTs of bank b. An unpopulated
//     bank gives 0;
//   * drives the constant identification lines from BOARD_ID.
//
// Interface: down is what the readout drives into the connector, up is what
// the card drives back. charge[n][c] is the shaped signal of channel c of chip
// slot n+1; the slots of an unpopulated bank are ignored. Timing is that of
// vfe_chip: there is no clock on the card besides CLOCK.
//
// The flavours, the two banks, the pair assignment, the per-bank TCALIB and
// the ANDed shift register outputs follow the interface specification. The
// bank of each SROUT line and the ID value are this design's choice; the SROUT
// and ID lines are not part of the connector table and are separate ports.
module vfe_pcb
  import ecal_pkg::*;
#(
  parameter flavour_e          FLAVOUR  = FLAV_FULL,
  parameter logic [ID_W-1:0]   BOARD_ID = '0
) (
  input  conn_down_t        down,
  input  ana_t              charge [N_CHIPS][N_CHAN],
  output conn_up_t          up,
  output logic [N_BANK:1]   srout,
  output logic [ID_W-1:0]   id
);

  vfe_ctrl_t ctrl;
  ana_t      vcalib;
  ana_t      chip_out   [N_CHIPS];
  logic      chip_srout [N_CHIPS];

  // Connector decode.
  always_comb begin
    ctrl   = '0;
    vcalib = '0;
    for (int unsigned p = 1; p <= N_CONN_PAIRS; p++) begin
      pin_sig_t s;
      s = pair_signal(FLAVOUR, p);
      case (s.kind)
        SIG_HOLD:   ctrl.hold  = down.dig[p];
        SIG_RESET:  ctrl.reset = down.dig[p];
        SIG_SRIN:   ctrl.srin  = down.dig[p];
        SIG_CLOCK:  ctrl.clock = down.dig[p];
        SIG_ENABLE: ctrl.enable[s.num] = down.dig[p];
        SIG_TCALIB: ctrl.tcalib[s.num] = down.dig[p];
        SIG_VCALIB: vcalib = down.ana[p];
        default: ;
      endcase
    end
  end

  for (genvar n = 0; n < N_CHIPS; n++) begin : g_chip
    localparam int unsigned BANK = n / CHIPS_PER_BANK + 1;
    localparam bit POPULATED = (FLAVOUR == FLAV_FULL) ||
                               (FLAVOUR == FLAV_LEFT  && BANK == 1) ||
                               (FLAVOUR == FLAV_RIGHT && BANK == 2);
    if (POPULATED) begin : g_pop
      vfe_chip u_chip (
        .charge (charge[n]),
        .hold   (ctrl.hold),
        .reset  (ctrl.reset),
        .srin   (ctrl.srin),
        .clock  (ctrl.clock),
        .tcalib (ctrl.tcalib[BANK]),
        .enable (ctrl.enable),
        .vcalib (vcalib),
        .out    (chip_out[n]),
        .srout  (chip_srout[n])
      );
    end else begin : g_empty
      assign chip_out[n]   = '0;
      assign chip_srout[n] = 1'b0;
    end
  end

  // Channel outputs onto their pairs.
  always_comb begin
    up = '0;
    for (int unsigned p = 1; p <= N_CONN_PAIRS; p++) begin
      pin_sig_t s;
      s = pair_signal(FLAVOUR, p);
      if (s.kind == SIG_OUTPUT) up[p] = chip_out[s.num - 1];
    end
  end

  // Bank shift register outputs: AND of the six chips of the bank.
  always_comb begin
    for (int unsigned b = 1; b <= N_BANK; b++) begin
      srout[b] = 1'b1;
      for (int unsigned k = 0; k < CHIPS_PER_BANK; k++)
        srout[b] &= chip_srout[(b - 1) * CHIPS_PER_BANK + k];
    end
  end

  assign id = BOARD_ID;

endmodule
