// dct_engine: N-point 1D DCT (DCT-II) or IDCT (DCT-III) on a serial stream of
// complex samples. The real and imaginary parts are transformed separately
// with the same real cosine kernel.
//
//   forward (INVERSE=0):  X(k) = 2^-SHIFT * sum_n x(n) cos(pi*(2n+1)*k/(2N))
//   inverse (INVERSE=1):  x(n) = 2^-SHIFT * ( X(0)/2
//                                 + sum_{k>=1} X(k) cos(pi*(2n+1)*k/(2N)) )
//
// With SHIFT = log2(N)-1 for the forward and 0 for the inverse the pair is
// exactly inverse (up to rounding). The kernel is the DCT of the source
// design; the power-of-two scaling, the fixed-point formats and the
// architecture below are this design's own.
//
// Architecture: a column-serial matrix product. Sample i of a block is
// multiplied by the N cosines of column i (read from cos_rom) and added into
// N complex accumulators, so one block of N samples takes N input cycles and
// 2N real multipliers. When the last sample of a block arrives the N
// rounded, saturated results are copied into an output buffer and the
// accumulators restart, so blocks can follow each other with no gap.
//
// Interface and timing: in_valid qualifies in_data/in_tag; samples of a block
// arrive in index order, gaps are allowed. After the last input of a block
// the N results leave on N consecutive cycles; the first has out_valid high
// two cycles after the cycle of the block's last in_valid (latency 2).
// out_idx is the result index; out_tag is in_tag of the block's last sample.
// Throughput: one sample per clock. Synchronous active-low reset.
module dct_engine
  import ofdm_pkg::*;
#(
  parameter int N       = 8,
  parameter bit INVERSE = 1'b0,
  parameter int SHIFT   = 2,
  parameter int TAG_W   = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  input  logic [TAG_W-1:0]     in_tag,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output cplx_t                out_data,
  output logic [TAG_W-1:0]     out_tag
);

  localparam int IW = $clog2(N);
  localparam int AW = 2 * COEF_W + IW + 1;
  localparam int S  = COEF_FRAC + SHIFT;

  typedef logic signed [AW-1:0] acc_t;

  logic [IW-1:0]       cnt;
  logic        [7:0]   phase [N];
  logic signed [15:0]  cosv  [N];
  acc_t                acc_re [N];
  acc_t                acc_im [N];
  acc_t                sum_re [N];
  acc_t                sum_im [N];
  cplx_t               obuf   [N];
  logic [TAG_W-1:0]    otag;
  logic                busy;
  logic [IW-1:0]       oidx;

  cos_rom #(.NPORT(N)) u_rom (.phase(phase), .value(cosv));

  // Phase of cos(pi*(2n+1)*k/(2N)) on the ROM's 256-step circle.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      int n, k;
      n = INVERSE ? j : int'(cnt);
      k = INVERSE ? int'(cnt) : j;
      phase[j] = 8'(((2 * n + 1) * k) * (64 / N));
    end
  end

  // Column products added to the running sums (restarted at sample 0).
  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic signed [15:0] c;
      c = (INVERSE && cnt == '0) ? (cosv[j] >>> 1) : cosv[j];
      sum_re[j] = (cnt == '0 ? acc_t'(0) : acc_re[j]) + acc_t'(in_data.re * c);
      sum_im[j] = (cnt == '0 ? acc_t'(0) : acc_im[j]) + acc_t'(in_data.im * c);
    end
  end

  function automatic sample_t round_sat(input acc_t v);
    acc_t r;
    r = (v + (acc_t'(1) <<< (S - 1))) >>> S;
    return sat16(48'(r));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      busy <= 1'b0;
      oidx <= '0;
      otag <= '0;
      for (int j = 0; j < N; j++) begin
        acc_re[j] <= '0;
        acc_im[j] <= '0;
        obuf[j]   <= '0;
      end
    end else begin
      if (busy) begin
        oidx <= oidx + 1'b1;
        if (oidx == IW'(N - 1)) busy <= 1'b0;
      end
      if (in_valid) begin
        cnt <= cnt + 1'b1;
        for (int j = 0; j < N; j++) begin
          acc_re[j] <= sum_re[j];
          acc_im[j] <= sum_im[j];
        end
        if (cnt == IW'(N - 1)) begin
          for (int j = 0; j < N; j++) begin
            obuf[j].re <= round_sat(sum_re[j]);
            obuf[j].im <= round_sat(sum_im[j]);
          end
          otag <= in_tag;
          busy <= 1'b1;
          oidx <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= busy;
      out_idx   <= oidx;
      out_data  <= obuf[oidx];
      out_tag   <= otag;
    end
  end

  // A new block may only complete once the previous one is (nearly) drained.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && cnt == IW'(N - 1)) |-> (!busy || oidx == IW'(N - 1)));

endmodule
