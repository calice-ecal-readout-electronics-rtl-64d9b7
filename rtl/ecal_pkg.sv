// ecal_pkg: constants, types and the connector map shared by the VFE-PCB
// readout modules.
//
// The silicon calorimeter layer is read out through VFE-PCBs. Each board
// carries up to twelve 18-channel front-end chips in two banks of six, and
// talks to the readout board over one 68-pin connector whose pins are used
// as 34 differential pairs. Pair k is formed by pins (k+34, k), the first
// being the positive leg.
//
// Analogue levels (the channel outputs and the calibration level) are
// represented in this RTL by an unsigned ANA_W-bit number. 14 bits is the
// dynamic range the channel output must be digitised with; the mapping from
// volts to codes is this design's own abstraction (0 = bottom of the range).
// A differential digital pair is represented by the level of its positive
// leg.
//
// pair_signal() encodes the connector table: which signal sits on which pair
// for each of the three board flavours. Half-populated boards leave the pairs
// of the missing bank floating.
package ecal_pkg;

  localparam int unsigned N_CHAN        = 18; // channels per VFE chip
  localparam int unsigned N_CHIPS       = 12; // chip slots per VFE-PCB
  localparam int unsigned N_BANK        = 2;  // chip banks (one per half board)
  localparam int unsigned CHIPS_PER_BANK = N_CHIPS / N_BANK;
  localparam int unsigned N_GROUPS      = 6;  // calibration groups per chip
  localparam int unsigned GROUP_SIZE    = N_CHAN / N_GROUPS;
  localparam int unsigned N_CONN_PAIRS  = 34; // differential pairs on the 68-pin connector
  localparam int unsigned ANA_W         = 14; // analogue level resolution
  localparam int unsigned ID_W          = 6;  // VFE-PCB identification lines
  localparam int unsigned CHAN_W        = $clog2(N_CHAN);

  typedef logic [ANA_W-1:0] ana_t;

  typedef enum logic [1:0] {
    FLAV_FULL  = 2'd0,  // six wafers, twelve chips
    FLAV_LEFT  = 2'd1,  // three wafers, chips 1-6 (bank 1)
    FLAV_RIGHT = 2'd2   // three wafers, chips 7-12 (bank 2)
  } flavour_e;

  // Control lines from the readout electronics to one VFE-PCB. The bit index
  // of tcalib and enable is the signal number (TCALIB1, ENABLE1, ...).
  typedef struct packed {
    logic       hold;
    logic       reset;
    logic       srin;
    logic       clock;
    logic [2:1] tcalib;
    logic [6:1] enable;
  } vfe_ctrl_t;

  // Everything the readout electronics drives into one connector: a digital
  // level and an analogue level per pair (only VCALIB uses the latter).
  typedef struct packed {
    logic [N_CONN_PAIRS:1] dig;
    ana_t [N_CONN_PAIRS:1] ana;
  } conn_down_t;

  // Everything a VFE-PCB drives back into its connector (the channel outputs).
  typedef ana_t [N_CONN_PAIRS:1] conn_up_t;

  typedef enum logic [3:0] {
    SIG_FLOAT,
    SIG_OUTPUT,
    SIG_HOLD,
    SIG_VCALIB,
    SIG_SRIN,
    SIG_RESET,
    SIG_ENABLE,
    SIG_CLOCK,
    SIG_TCALIB
  } sig_kind_e;

  typedef struct packed {
    sig_kind_e  kind;
    logic [3:0] num;   // OUTPUTn, ENABLEn, TCALIBn number; 0 otherwise
  } pin_sig_t;

  function automatic pin_sig_t mk_sig(sig_kind_e k, logic [3:0] n);
    pin_sig_t s;
    s.kind = k;
    s.num  = n;
    return s;
  endfunction

  // Signal on pair p (1..34) of a fully-populated board.
  function automatic pin_sig_t full_pair_signal(int unsigned p);
    case (p)
      1:  return mk_sig(SIG_OUTPUT, 1);
      2:  return mk_sig(SIG_OUTPUT, 7);
      4:  return mk_sig(SIG_OUTPUT, 2);
      5:  return mk_sig(SIG_OUTPUT, 8);
      6:  return mk_sig(SIG_HOLD, 0);
      7:  return mk_sig(SIG_VCALIB, 0);
      8:  return mk_sig(SIG_SRIN, 0);
      9:  return mk_sig(SIG_RESET, 0);
      10: return mk_sig(SIG_ENABLE, 1);
      11: return mk_sig(SIG_ENABLE, 2);
      12: return mk_sig(SIG_ENABLE, 3);
      13: return mk_sig(SIG_CLOCK, 0);
      14: return mk_sig(SIG_OUTPUT, 3);
      15: return mk_sig(SIG_OUTPUT, 9);
      16: return mk_sig(SIG_ENABLE, 4);
      17: return mk_sig(SIG_ENABLE, 5);
      18: return mk_sig(SIG_ENABLE, 6);
      20: return mk_sig(SIG_OUTPUT, 4);
      21: return mk_sig(SIG_OUTPUT, 10);
      25: return mk_sig(SIG_TCALIB, 1);
      26: return mk_sig(SIG_TCALIB, 2);
      30: return mk_sig(SIG_OUTPUT, 5);
      31: return mk_sig(SIG_OUTPUT, 11);
      33: return mk_sig(SIG_OUTPUT, 6);
      34: return mk_sig(SIG_OUTPUT, 12);
      default: return mk_sig(SIG_FLOAT, 0);
    endcase
  endfunction

  // Bank (1 or 2) served by an OUTPUTn or TCALIBn signal; 0 for shared ones.
  function automatic int unsigned sig_bank(pin_sig_t s);
    if (s.kind == SIG_OUTPUT) return (s.num <= 4'(CHIPS_PER_BANK)) ? 1 : 2;
    if (s.kind == SIG_TCALIB) return int'(s.num);
    return 0;
  endfunction

  // Signal on pair p (1..34) for a board of flavour f.
  function automatic pin_sig_t pair_signal(flavour_e f, int unsigned p);
    pin_sig_t s = full_pair_signal(p);
    int unsigned b = sig_bank(s);
    if ((f == FLAV_LEFT  && b == 2) || (f == FLAV_RIGHT && b == 1))
      return mk_sig(SIG_FLOAT, 0);
    return s;
  endfunction

  // Pair that carries OUTPUTn (n = 1..12); the same on every flavour.
  function automatic int unsigned output_pair(int unsigned n);
    for (int unsigned p = 1; p <= N_CONN_PAIRS; p++) begin
      pin_sig_t s = full_pair_signal(p);
      if (s.kind == SIG_OUTPUT && int'(s.num) == n) return p;
    end
    return 0;
  endfunction

  // Calibration group (1..6) of channel c (0..17): consecutive triplets.
  function automatic int unsigned chan_group(int unsigned c);
    return c / GROUP_SIZE + 1;
  endfunction

endpackage
