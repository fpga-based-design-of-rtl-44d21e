// ofdm_pkg: types, number formats and the pilot sequence shared by the
// DCT-OFDM transmitter, receiver and DCT channel estimator.
//
// Number formats (this design's choice; the source design gives no widths):
//   * complex samples: two signed 16-bit parts, 9 fraction bits, so 1.0 = 512
//     and the 16-QAM levels +-1, +-3 sit well inside the +-64 range;
//   * cosine coefficients: signed 16-bit, 14 fraction bits (1.0 = 16384).
// The pilot (preamble) sequence is a fixed pseudo-random pattern of +-1+-j
// values, one per subcarrier, known to both transmitters and the receiver.
package ofdm_pkg;

  localparam int DATA_W    = 16;
  localparam int DATA_FRAC = 9;
  localparam int COEF_W    = 16;
  localparam int COEF_FRAC = 14;
  localparam logic signed [DATA_W-1:0] ONE = 16'sd512;

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Bit 2k selects the sign of the real part of pilot k, bit 2k+1 the sign
  // of the imaginary part (1 = negative). Covers up to 64 subcarriers.
  localparam logic [127:0] PILOT_PAT = 128'h6513270e269e0d37f2a74de452e6b438;

  function automatic logic [1:0] pilot_signs(input int unsigned k);
    return {PILOT_PAT[(2*k+1)%128], PILOT_PAT[(2*k)%128]};
  endfunction

  // Pilot value of subcarrier k: (+-1 +-j) in sample format.
  function automatic cplx_t pilot(input int unsigned k);
    cplx_t p;
    logic [1:0] s;
    s = pilot_signs(k);
    p.re = s[0] ? -ONE : ONE;
    p.im = s[1] ? -ONE : ONE;
    return p;
  endfunction

  // Saturate a wide signed value to a 16-bit sample.
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sd32767;
    else if (v < -48'sd32768) return -16'sd32768;
    else                      return v[15:0];
  endfunction

  function automatic cplx_t cneg(input cplx_t a);
    cplx_t r;
    r.re = sat16(48'(-a.re));
    r.im = sat16(48'(-a.im));
    return r;
  endfunction

endpackage
