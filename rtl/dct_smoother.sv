// dct_smoother: smoothing (noise-reduction) filter in the DCT domain.
//
// The channel estimator transforms each block of BLK least-squares channel
// estimates with a DCT. The useful channel energy sits in the first
// W = 2L/R coefficients of each block (L: channel length, R: number of
// blocks); the remaining coefficients hold mostly noise. The filter keeps
// coefficients with index < W and replaces the others by zero, as the
// source design's window of size W does. The rectangular window and the
// default W = 4 (L = 16, R = 8) are this design's choices.
//
// Interface and timing: a valid/index/data stream in, the same stream out
// one clock later. in_idx is the coefficient index inside the block. The
// tag travels with the data. Synchronous active-low reset.
module dct_smoother
  import ofdm_pkg::*;
#(
  parameter int BLK   = 8,
  parameter int W     = 4,
  parameter int TAG_W = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(BLK)-1:0] in_idx,
  input  cplx_t                  in_data,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_valid,
  output logic [$clog2(BLK)-1:0] out_idx,
  output cplx_t                  out_data,
  output logic [TAG_W-1:0]       out_tag,
  output logic                   out_zeroed
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_idx    <= '0;
      out_data   <= '0;
      out_tag    <= '0;
      out_zeroed <= 1'b0;
    end else begin
      out_valid  <= in_valid;
      out_idx    <= in_idx;
      out_tag    <= in_tag;
      out_zeroed <= in_valid && (int'(in_idx) >= W);
      out_data   <= (int'(in_idx) < W) ? in_data : '0;
    end
  end

endmodule
