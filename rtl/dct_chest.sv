// dct_chest: DCT-based channel estimator for one stream of least-squares
// channel estimates.
//
// The M least-squares estimates of one antenna link are cut into M/BLK
// consecutive, non-overlapping blocks of BLK subcarriers (8 blocks of 8 for
// 64 subcarriers). Each block goes through a BLK-point DCT, the smoothing
// filter keeps the first W coefficients, and a BLK-point IDCT returns the
// smoothed estimates to the frequency domain. One DCT and one IDCT serve
// all blocks one after the other, as in the source design.
//
// Interface and timing: one complex estimate per valid cycle, in subcarrier
// order, with gaps allowed; in_tag travels with each block (it is sampled
// with the block's last estimate). The smoothed block leaves on BLK
// consecutive cycles, the first one BLK+4 cycles after the block's last
// input (DCT 2, then BLK-1 more DCT outputs, smoother 1, IDCT 2): 12 cycles
// for BLK = 8. Throughput one estimate per clock. out_idx is the index inside the block.
// zeroed_cnt counts the coefficients the smoother has removed.
module dct_chest
  import ofdm_pkg::*;
#(
  parameter int BLK   = 8,
  parameter int W     = 4,
  parameter int TAG_W = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  cplx_t                  in_data,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_valid,
  output logic [$clog2(BLK)-1:0] out_idx,
  output cplx_t                  out_data,
  output logic [TAG_W-1:0]       out_tag,
  output logic [31:0]            zeroed_cnt
);

  localparam int IW = $clog2(BLK);

  logic             d_valid, s_valid, s_zeroed;
  logic [IW-1:0]    d_idx, s_idx;  // s_idx unused: the IDCT counts itself
  cplx_t            d_data, s_data;
  logic [TAG_W-1:0] d_tag, s_tag;

  dct_engine #(.N(BLK), .INVERSE(1'b0), .SHIFT(IW - 1), .TAG_W(TAG_W)) u_dct (
    .clk, .rst_n,
    .in_valid, .in_data, .in_tag,
    .out_valid(d_valid), .out_idx(d_idx), .out_data(d_data), .out_tag(d_tag)
  );

  dct_smoother #(.BLK(BLK), .W(W), .TAG_W(TAG_W)) u_smooth (
    .clk, .rst_n,
    .in_valid(d_valid), .in_idx(d_idx), .in_data(d_data), .in_tag(d_tag),
    .out_valid(s_valid), .out_idx(s_idx), .out_data(s_data), .out_tag(s_tag),
    .out_zeroed(s_zeroed)
  );

  dct_engine #(.N(BLK), .INVERSE(1'b1), .SHIFT(0), .TAG_W(TAG_W)) u_idct (
    .clk, .rst_n,
    .in_valid(s_valid), .in_data(s_data), .in_tag(s_tag),
    .out_valid, .out_idx, .out_data, .out_tag
  );

  always_ff @(posedge clk) begin
    if (!rst_n)        zeroed_cnt <= '0;
    else if (s_zeroed) zeroed_cnt <= zeroed_cnt + 1;
  end

endmodule
