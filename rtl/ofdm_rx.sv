// ofdm_rx: receiver of the DCT-based MIMO-OFDM link with LS and DCT-based
// channel estimation, for one receive antenna and two transmit antennas.
//
// The received samples lose their cyclic prefix (cp_remove) and an N-point
// DCT takes each symbol back to the frequency domain. The first two
// symbols of a frame are the preamble: they go to the least-squares
// estimator (ls_estimator), which delivers N estimates for the link from
// transmit antenna 0 and then N for antenna 1. These are smoothed by the
// DCT channel estimator (dct_chest: 8-point DCT, keep W coefficients,
// 8-point IDCT on blocks of 8 subcarriers). Data symbols leave the
// receiver in the frequency domain together with both channel estimates;
// the source design ends at the channel coefficients and describes no
// equaliser or demapper, so none is built here.
//
// Interface and timing: in_valid/in_sof/in_data as produced by ofdm_tx
// after the channel (in_sof on the frame's first sample; ideal frame
// synchronisation is assumed). Outputs, all valid-qualified:
//   rx_*  data symbols: symbol number within the frame's data part,
//         subcarrier and received value;
//   ls_*  least-squares estimates: transmit antenna, subcarrier, value;
//   h_*   smoothed DCT-based estimates, in the same order as ls_*.
// RX_SHIFT sets the DCT scaling so that it undoes the transmitter's
// TX_SHIFT: SHIFT = log2(N) - 1 - TX_SHIFT.
module ofdm_rx
  import ofdm_pkg::*;
#(
  parameter int N        = 64,
  parameter int CP       = 16,
  parameter int BLK      = 8,
  parameter int W        = 4,
  parameter int RX_SHIFT = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sof,
  input  cplx_t                in_data,
  output logic                 rx_valid,
  output logic [7:0]           rx_sym,
  output logic [$clog2(N)-1:0] rx_sc,
  output cplx_t                rx_data,
  output logic                 ls_valid,
  output logic                 ls_tx,
  output logic [$clog2(N)-1:0] ls_sc,
  output cplx_t                ls_data,
  output logic                 h_valid,
  output logic                 h_tx,
  output logic [$clog2(N)-1:0] h_sc,
  output cplx_t                h_data,
  output logic [31:0]          zeroed_cnt
);

  localparam int IW = $clog2(N);
  localparam int BW = $clog2(BLK);
  localparam int TW = 1 + IW - BW;  // chest tag: antenna and block number

  logic          c_valid;
  logic [IW-1:0] c_idx;
  logic [7:0]    c_sym;
  cplx_t         c_data;

  logic          y_valid;
  logic [IW-1:0] y_idx;
  logic [7:0]    y_sym;
  cplx_t         y_data;
  logic          preamble;

  logic          e_valid;
  logic [BW-1:0] e_idx;
  logic [TW-1:0] e_tag;
  cplx_t         e_data;

  cp_remove #(.N(N), .CP(CP), .SYM_W(8)) u_cprm (
    .clk, .rst_n, .in_valid, .in_sof, .in_data,
    .out_valid(c_valid), .out_idx(c_idx), .out_sym(c_sym), .out_data(c_data)
  );

  // c_idx is not needed: the DCT numbers the samples of a symbol itself.
  dct_engine #(.N(N), .INVERSE(1'b0), .SHIFT(RX_SHIFT), .TAG_W(8)) u_dct (
    .clk, .rst_n,
    .in_valid(c_valid), .in_data(c_data), .in_tag(c_sym),
    .out_valid(y_valid), .out_idx(y_idx), .out_data(y_data), .out_tag(y_sym)
  );

  assign preamble = (y_sym < 8'd2);

  // Pilot extraction: preamble symbols to the LS estimator.
  ls_estimator #(.N(N)) u_ls (
    .clk, .rst_n,
    .in_valid(y_valid && preamble), .in_sym(y_sym[0]), .in_sc(y_idx),
    .in_data(y_data),
    .out_valid(ls_valid), .out_tx(ls_tx), .out_sc(ls_sc), .out_data(ls_data)
  );

  // Data symbols out.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_valid <= 1'b0;
      rx_sym   <= '0;
      rx_sc    <= '0;
      rx_data  <= '0;
    end else begin
      rx_valid <= y_valid && !preamble;
      rx_sym   <= y_sym - 8'd2;
      rx_sc    <= y_idx;
      rx_data  <= y_data;
    end
  end

  dct_chest #(.BLK(BLK), .W(W), .TAG_W(TW)) u_chest (
    .clk, .rst_n,
    .in_valid(ls_valid), .in_data(ls_data), .in_tag({ls_tx, ls_sc[IW-1:BW]}),
    .out_valid(e_valid), .out_idx(e_idx), .out_data(e_data), .out_tag(e_tag),
    .zeroed_cnt
  );

  assign h_valid = e_valid;
  assign h_tx    = e_tag[TW-1];
  assign h_sc    = {e_tag[TW-2:0], e_idx};
  assign h_data  = e_data;

endmodule
