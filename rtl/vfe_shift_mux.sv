// vfe_shift_mux: readout shift register of one 18-channel front-end chip.
//
// The chip multiplexes its held channel levels onto a single output line. A
// token shift register, clocked by the readout CLOCK line, decides which
// channel is on the line: the token enters from SRIN on a rising CLOCK edge
// and moves one stage per edge. After the first edge channel 0 is selected,
// after the 18th edge channel 17 is selected and SROUT (the last stage) is
// high, so a board can chain or AND the SROUTs to check that every chip saw
// all 18 clocks.
//
// Interface: clock and reset are the board's CLOCK and RESET lines; reset is
// asynchronous and active high and clears the whole register. sel is the
// one-hot (or empty) channel selection, srout the last stage.
//
// The 18 channels, the single multiplexed output, the SRIN/CLOCK/RESET/SROUT
// lines and the 18 clocks per readout follow the interface specification;
// the rising-edge shift and the asynchronous clear are this design's choice.
module vfe_shift_mux #(
  parameter int unsigned N_CHAN = 18
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              srin,
  output logic [N_CHAN-1:0] sel,
  output logic              srout
);

  always_ff @(posedge clock or posedge reset) begin
    if (reset) sel <= '0;
    else       sel <= {sel[N_CHAN-2:0], srin};
  end

  assign srout = sel[N_CHAN-1];

endmodule
