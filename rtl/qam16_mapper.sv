// qam16_mapper: 16-QAM signal mapper of the transmitter.
//
// Four bits select one of 16 constellation points with levels -3, -1, +1,
// +3 (in sample units, 1.0 = 512) on each axis. Bits [3:2] choose the real
// level and bits [1:0] the imaginary level, each with the Gray code
// 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3, so neighbouring points differ in
// one bit. The source design states only that 16-QAM is used; the bit
// order, the Gray code and the scale are this design's choices.
//
// Purely combinational.
module qam16_mapper
  import ofdm_pkg::*;
(
  input  logic [3:0] bits,
  output cplx_t      sym
);

  function automatic sample_t level(input logic [1:0] b);
    unique case (b)
      2'b00:   return -sample_t'(3 * ONE);
      2'b01:   return -ONE;
      2'b11:   return ONE;
      default: return sample_t'(3 * ONE);
    endcase
  endfunction

  always_comb begin
    sym.re = level(bits[3:2]);
    sym.im = level(bits[1:0]);
  end

endmodule
