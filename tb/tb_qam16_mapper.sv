// tb_qam16_mapper: all 16 bit patterns against the Gray-coded levels
// (sign from the first bit of a pair, magnitude 1 when the second bit is
// set and 3 when it is clear), and checks that neighbouring points differ in
// exactly one bit.
module tb_qam16_mapper;
  import ofdm_pkg::*;
  logic [3:0] bits;
  cplx_t      sym;
  int checks = 0, failures = 0;

  qam16_mapper dut (.bits, .sym);

  function automatic int lvl(logic [1:0] b);
    return (b[1] ? 1 : -1) * (b[0] ? 1 : 3);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int code_of [4][4];
    for (int b = 0; b < 16; b++) begin
      sample_t re, im;
      bits = 4'(b);
      #1;
      re = sym.re;
      im = sym.im;
      checks++;
      if (int'(re) != 512 * lvl(bits[3:2]) || int'(im) != 512 * lvl(bits[1:0])) begin
        failures++;
        $display("bits %b: got (%0d,%0d)", bits, re, im);
      end
      code_of[(int'(re) / 512 + 3) / 2][(int'(im) / 512 + 3) / 2] = b;
    end
    // Gray property along both axes.
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 3; j++) begin
        checks += 2;
        if ($countones(4'(code_of[i][j] ^ code_of[i][j+1])) != 1) failures++;
        if ($countones(4'(code_of[j][i] ^ code_of[j+1][i])) != 1) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
