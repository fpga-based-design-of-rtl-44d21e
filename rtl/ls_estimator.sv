// ls_estimator: least-squares channel estimation for two transmit antennas.
//
// The frame preamble is two pilot symbols: antenna 0 sends P in both,
// antenna 1 sends P and then -P (see pilot_insert). On subcarrier k one
// receive antenna therefore sees
//   Y0 = P (H0 + H1) + E0,   Y1 = P (H0 - H1) + E1
// and the least-squares estimates are
//   H0_LS = (Y0 + Y1) / (2P),   H1_LS = (Y0 - Y1) / (2P).
// Because every pilot is +-1+-j, 1/P = conj(P)/2, so the divisions reduce to
// additions, sign changes and a shift by 2: no multiplier and no divider.
// The least-squares estimator and its two-antenna preamble form follow the
// source design; the pilot values and the arithmetic are this design's.
//
// How it works: the first preamble symbol is stored in an N-entry buffer.
// While the second arrives, H0_LS leaves at once and H1_LS overwrites the
// buffer entry it came from; after the symbol's last subcarrier the buffer
// is replayed, so the N estimates of link 0 are followed by the N of link 1
// on one output.
//
// Interface and timing: in_sym selects preamble symbol 0 or 1, in_sc is the
// subcarrier. Outputs are registered: H0_LS one clock after the matching
// input, H1_LS on N consecutive cycles starting two clocks after the last
// subcarrier of symbol 1. out_tx names the transmit antenna of the link.
module ls_estimator
  import ofdm_pkg::*;
#(
  parameter int N = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sym,
  input  logic [$clog2(N)-1:0] in_sc,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output logic                 out_tx,
  output logic [$clog2(N)-1:0] out_sc,
  output cplx_t                out_data
);

  localparam int IW = $clog2(N);

  typedef logic signed [DATA_W+2:0] wide_t;

  cplx_t         buffer [N];
  logic          rp_active;
  logic [IW-1:0] rp_idx;

  // conj(s) * a / 4 with s = (+-1 +-j) given by its sign bits.
  function automatic cplx_t ls_div(input wide_t ar, input wide_t ai,
                                   input logic [1:0] s);
    wide_t sr_ar, si_ai, sr_ai, si_ar;
    wide_t re, im, qr, qi;
    cplx_t h;
    sr_ar = s[0] ? -ar : ar;
    si_ai = s[1] ? -ai : ai;
    sr_ai = s[0] ? -ai : ai;
    si_ar = s[1] ? -ar : ar;
    re = sr_ar + si_ai;
    im = sr_ai - si_ar;
    qr = (re + wide_t'(2)) >>> 2;
    qi = (im + wide_t'(2)) >>> 2;
    h.re = sat16(48'(qr));
    h.im = sat16(48'(qi));
    return h;
  endfunction

  cplx_t       y0, h0, h1;
  logic [1:0]  ps;

  always_comb begin
    y0 = buffer[in_sc];
    ps = pilot_signs(int'(in_sc));
    h0 = ls_div(wide_t'(y0.re) + wide_t'(in_data.re),
                wide_t'(y0.im) + wide_t'(in_data.im), ps);
    h1 = ls_div(wide_t'(y0.re) - wide_t'(in_data.re),
                wide_t'(y0.im) - wide_t'(in_data.im), ps);
  end

  always_ff @(posedge clk) begin
    if (in_valid) buffer[in_sc] <= in_sym ? h1 : in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp_active <= 1'b0;
      rp_idx    <= '0;
      out_valid <= 1'b0;
      out_tx    <= 1'b0;
      out_sc    <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (rp_active) begin
        out_valid <= 1'b1;
        out_tx    <= 1'b1;
        out_sc    <= rp_idx;
        out_data  <= buffer[rp_idx];
        rp_idx    <= rp_idx + 1'b1;
        if (rp_idx == IW'(N - 1)) rp_active <= 1'b0;
      end else if (in_valid && in_sym) begin
        out_valid <= 1'b1;
        out_tx    <= 1'b0;
        out_sc    <= in_sc;
        out_data  <= h0;
        if (in_sc == IW'(N - 1)) begin
          rp_active <= 1'b1;
          rp_idx    <= '0;
        end
      end
    end
  end

  // The replay owns the output and the buffer until it has finished.
  a_no_input_during_replay: assert property (@(posedge clk) disable iff (!rst_n)
    rp_active |-> !in_valid);

endmodule
