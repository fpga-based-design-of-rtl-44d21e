// mimo_ofdm_top: 2x1 DCT-based MIMO-OFDM link, two transmitters and one
// receiver with LS and DCT-based channel estimation.
//
// Two ofdm_tx instances (antennas 0 and 1) share one start pulse and run in
// lock-step; each takes its own 4-bit data stream. Their time-domain
// outputs leave the design on tx0_* and tx1_*: the radio channel between
// them and the receive antenna is not part of the hardware, so the
// received samples come back in on rx_in_*. One ofdm_rx recovers the data
// symbols in the frequency domain and estimates both links, first by least
// squares and then with the block DCT smoothing. Two transmit chains and
// one receive chain is the structure of the source design's top level; the
// 2x1 antenna count is this design's reading of it.
//
// Parameters are passed down: N subcarriers, CP prefix samples, NDATA data
// symbols per frame, BLK-point DCT blocks and W kept coefficients.
module mimo_ofdm_top
  import ofdm_pkg::*;
#(
  parameter int N        = 64,
  parameter int CP       = 16,
  parameter int NDATA    = 4,
  parameter int BLK      = 8,
  parameter int W        = 4,
  parameter int TX_SHIFT = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [3:0]           din0,
  input  logic [3:0]           din1,
  output logic                 din_req0,
  output logic                 din_req1,
  output logic                 tx_busy,
  output logic                 tx0_valid,
  output logic                 tx0_sof,
  output cplx_t                tx0_data,
  output logic                 tx1_valid,
  output logic                 tx1_sof,
  output cplx_t                tx1_data,
  input  logic                 rx_in_valid,
  input  logic                 rx_in_sof,
  input  cplx_t                rx_in_data,
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

  logic busy0, busy1;

  ofdm_tx #(.N(N), .CP(CP), .NDATA(NDATA), .TX_ID(0), .TX_SHIFT(TX_SHIFT)) u_tx0 (
    .clk, .rst_n, .start, .din(din0), .din_req(din_req0), .busy(busy0),
    .out_valid(tx0_valid), .out_sof(tx0_sof), .out_data(tx0_data)
  );

  ofdm_tx #(.N(N), .CP(CP), .NDATA(NDATA), .TX_ID(1), .TX_SHIFT(TX_SHIFT)) u_tx1 (
    .clk, .rst_n, .start, .din(din1), .din_req(din_req1), .busy(busy1),
    .out_valid(tx1_valid), .out_sof(tx1_sof), .out_data(tx1_data)
  );

  assign tx_busy = busy0 | busy1;

  ofdm_rx #(.N(N), .CP(CP), .BLK(BLK), .W(W),
            .RX_SHIFT($clog2(N) - 1 - TX_SHIFT)) u_rx (
    .clk, .rst_n,
    .in_valid(rx_in_valid), .in_sof(rx_in_sof), .in_data(rx_in_data),
    .rx_valid, .rx_sym, .rx_sc, .rx_data,
    .ls_valid, .ls_tx, .ls_sc, .ls_data,
    .h_valid, .h_tx, .h_sc, .h_data,
    .zeroed_cnt
  );

endmodule
