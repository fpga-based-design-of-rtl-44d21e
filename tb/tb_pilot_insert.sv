// tb_pilot_insert: for both antennas, all 64 subcarriers of symbols 0..3:
// preamble symbols must carry the pattern's +-1+-j pilots (negated on
// antenna 1 in symbol 1), data symbols the data input.
module tb_pilot_insert;
  import ofdm_pkg::*;
  logic [7:0] sym;
  logic [5:0] sc;
  cplx_t      data, out0, out1;
  logic       p0, p1;
  int checks = 0, failures = 0;

  pilot_insert #(.TX_ID(0)) dut0 (.sym, .sc, .data, .out(out0), .is_pilot(p0));
  pilot_insert #(.TX_ID(1)) dut1 (.sym, .sc, .data, .out(out1), .is_pilot(p1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < 64; k++) begin
        int er, ei, sg1;
        sym = 8'(s);
        sc  = 6'(k);
        data.re = 16'($urandom);
        data.im = 16'($urandom);
        #1;
        if (s < 2) begin
          er = PILOT_PAT[2*k]   ? -512 : 512;
          ei = PILOT_PAT[2*k+1] ? -512 : 512;
          sg1 = (s == 1) ? -1 : 1;
          checks++;
          if (out0 !== {16'(er), 16'(ei)} || out1 !== {16'(sg1*er), 16'(sg1*ei)} ||
              !p0 || !p1) begin
            failures++;
            $display("sym %0d sc %0d: got %h %h", s, k, out0, out1);
          end
        end else begin
          checks++;
          if (out0 !== data || out1 !== data || p0 || p1) begin
            failures++;
            $display("sym %0d sc %0d: data not passed", s, k);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
