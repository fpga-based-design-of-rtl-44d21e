// pilot_insert: block-type pilot insertion for one transmit antenna.
//
// Every frame starts with two preamble symbols in which all subcarriers
// carry pilots (block-type arrangement); data symbols follow. To let the
// receiver separate the two transmit antennas with a least-squares
// estimate, their preambles are orthogonal in time: antenna 0 sends the
// pilot sequence P twice, antenna 1 sends P and then -P. The receiver adds
// and subtracts the two received preamble symbols to get each link. P is
// the fixed +-1+-j sequence of ofdm_pkg. The block-type arrangement and
// the two-antenna, two-preamble LS scheme follow the source design; the
// sign pattern and the pilot values are this design's choices.
//
// Purely combinational: sym is the symbol index within the frame, sc the
// subcarrier index, data the mapped data symbol used for sym >= 2.
module pilot_insert
  import ofdm_pkg::*;
#(
  parameter int TX_ID = 0,
  parameter int SC_W  = 6
) (
  input  logic [7:0]      sym,
  input  logic [SC_W-1:0] sc,
  input  cplx_t           data,
  output cplx_t           out,
  output logic            is_pilot
);

  always_comb begin
    is_pilot = (sym < 8'd2);
    if (!is_pilot)                   out = data;
    else if (TX_ID == 1 && sym == 1) out = cneg(pilot(int'(sc)));
    else                             out = pilot(int'(sc));
  end

endmodule
