// ofdm_tx: one transmit antenna of the DCT-based MIMO-OFDM transmitter.
//
// A frame is 2 preamble symbols followed by NDATA data symbols, each of N
// subcarriers. For every symbol the controller walks the N subcarriers:
// preamble subcarriers get the pilot of this antenna (pilot_insert), data
// subcarriers get a 16-QAM point (qam16_mapper) made from the 4 bits read
// on din. The N frequency-domain values go through an N-point IDCT (the
// multicarrier modulator of this DCT-based OFDM system) and a cyclic prefix
// of CP samples is added (cp_insert). The chain mapper -> pilot insertion ->
// IDCT -> guard interval is the source design's; frame length, prefix
// length and the output scaling are this design's choices.
//
// Scaling: the IDCT runs with SHIFT = TX_SHIFT (time samples are
// 2^-TX_SHIFT * (X0/2 + sum X(k) cos(...))), which keeps the peaks of a
// 64-subcarrier 16-QAM symbol inside the 16-bit range; the receiver's DCT
// undoes it.
//
// Interface and timing: a one-cycle start pulse (ignored while busy) sends
// one frame. The controller spends N+CP cycles per symbol, feeding the IDCT
// in the first N; din_req is high in the cycles that take a data symbol
// from din (same cycle, no back-pressure), so two transmitters started
// together stay in lock-step. The frame leaves as (2+NDATA)*(N+CP)
// contiguous samples on out_valid/out_data, out_sof marking the first;
// the first sample appears 2N+5 cycles after the start cycle.
module ofdm_tx
  import ofdm_pkg::*;
#(
  parameter int N        = 64,
  parameter int CP       = 16,
  parameter int NDATA    = 4,
  parameter int TX_ID    = 0,
  parameter int TX_SHIFT = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [3:0] din,
  output logic       din_req,
  output logic       busy,
  output logic       out_valid,
  output logic       out_sof,
  output cplx_t      out_data
);

  localparam int IW   = $clog2(N);
  localparam int PW   = $clog2(N + CP);
  localparam int NSYM = 2 + NDATA;

  logic          run;
  logic [7:0]    sym;
  logic [PW-1:0] slot;
  logic          feed;
  cplx_t         qam, fsym;
  logic          is_pilot;

  logic          f_valid, f_tag;
  cplx_t         f_data;
  logic          m_valid, m_tag;
  logic [IW-1:0] m_idx;
  cplx_t         m_data;

  assign feed    = run && (int'(slot) < N);
  assign din_req = feed && !is_pilot;
  assign busy    = run;

  qam16_mapper u_map (.bits(din), .sym(qam));

  pilot_insert #(.TX_ID(TX_ID), .SC_W(IW)) u_pilot (
    .sym, .sc(slot[IW-1:0]), .data(qam), .out(fsym), .is_pilot
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run     <= 1'b0;
      sym     <= '0;
      slot    <= '0;
      f_valid <= 1'b0;
      f_tag   <= 1'b0;
      f_data  <= '0;
    end else begin
      f_valid <= feed;
      f_tag   <= (sym == '0);
      f_data  <= fsym;
      if (!run) begin
        if (start) begin
          run  <= 1'b1;
          sym  <= '0;
          slot <= '0;
        end
      end else if (slot == PW'(N + CP - 1)) begin
        slot <= '0;
        sym  <= sym + 1'b1;
        if (sym == 8'(NSYM - 1)) run <= 1'b0;
      end else begin
        slot <= slot + 1'b1;
      end
    end
  end

  dct_engine #(.N(N), .INVERSE(1'b1), .SHIFT(TX_SHIFT), .TAG_W(1)) u_idct (
    .clk, .rst_n,
    .in_valid(f_valid), .in_data(f_data), .in_tag(f_tag),
    .out_valid(m_valid), .out_idx(m_idx), .out_data(m_data), .out_tag(m_tag)
  );

  cp_insert #(.N(N), .CP(CP)) u_cp (
    .clk, .rst_n,
    .in_valid(m_valid), .in_sof(m_tag && m_idx == '0), .in_data(m_data),
    .out_valid, .out_sof, .out_data
  );

endmodule
