// tb_dct_chest: feeds 16 blocks of 8 random complex estimates (the first
// eight back to back, the rest with gaps) and compares every smoothed output
// with a floating-point model: 8-point DCT, keep the first W coefficients,
// 8-point IDCT. Also checks the 12-cycle latency, the tags and the count of
// removed coefficients.
module tb_dct_chest;
  import ofdm_pkg::*;
  localparam int BLK = 8, W = 4, NB = 16;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0;
  cplx_t      in_data = '0;
  logic [3:0] in_tag = '0;
  logic       out_valid;
  logic [2:0] out_idx;
  cplx_t      out_data;
  logic [3:0] out_tag;
  logic [31:0] zeroed_cnt;

  dct_chest #(.BLK(BLK), .W(W), .TAG_W(4)) dut (.*);

  int checks = 0, failures = 0;
  real xr [NB*BLK], xi [NB*BLK];
  real er [NB*BLK], ei [NB*BLK];
  int  nout = 0, t_last_in [NB];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Reference smoothing of block b.
  task automatic model(int b);
    real fr [BLK], fi [BLK];
    for (int k = 0; k < BLK; k++) begin
      fr[k] = 0.0; fi[k] = 0.0;
      for (int n = 0; n < BLK; n++) begin
        real c;
        c = $cos(PI * real'((2*n+1)*k) / real'(2*BLK));
        fr[k] += xr[b*BLK+n] * c;
        fi[k] += xi[b*BLK+n] * c;
      end
      fr[k] = fr[k] * 2.0 / real'(BLK);
      fi[k] = fi[k] * 2.0 / real'(BLK);
    end
    for (int n = 0; n < BLK; n++) begin
      real sr, si;
      sr = fr[0] / 2.0; si = fi[0] / 2.0;
      for (int k = 1; k < W; k++) begin
        real c;
        c = $cos(PI * real'((2*n+1)*k) / real'(2*BLK));
        sr += fr[k] * c;
        si += fi[k] * c;
      end
      er[b*BLK+n] = sr;
      ei[b*BLK+n] = si;
    end
  endtask

  initial begin
    int nin, t;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    nin = 0;
    t = 0;
    while (nout < NB*BLK && t < 2000) begin
      @(posedge clk);
      #1;
      t++;
      if (out_valid) begin
        sample_t dr, di;
        int b;
        dr = out_data.re;
        di = out_data.im;
        b = nout / BLK;
        checks++;
        if (int'(out_idx) != nout % BLK || int'(out_tag) != b % 16 ||
            rabs(real'(dr) - er[nout]) > 3.0 || rabs(real'(di) - ei[nout]) > 3.0) begin
          failures++;
          $display("out %0d: got (%0d,%0d) idx %0d tag %0d, expected (%f,%f)",
                   nout, dr, di, out_idx, out_tag, er[nout], ei[nout]);
        end
        if (nout % BLK == 0) begin
          checks++;
          if (t - t_last_in[b] != 12) begin
            failures++;
            $display("block %0d latency %0d, expected 12", b, t - t_last_in[b]);
          end
        end
        nout++;
      end
      if (nin < NB*BLK && (nin < 8*BLK || $urandom_range(0, 2) != 0)) begin
        cplx_t s;
        s.re = 16'(int'($urandom_range(0, 8000)) - 4000);
        s.im = 16'(int'($urandom_range(0, 8000)) - 4000);
        xr[nin] = real'(s.re);
        xi[nin] = real'(s.im);
        in_valid = 1;
        in_data  = s;
        in_tag   = 4'(nin / BLK);
        if (nin % BLK == BLK - 1) begin
          model(nin / BLK);
          t_last_in[nin / BLK] = t;
        end
        nin++;
      end else begin
        in_valid = 0;
      end
    end
    checks++;
    if (nout != NB*BLK || zeroed_cnt != 32'(NB*(BLK-W))) begin
      failures++;
      $display("outputs %0d zeroed %0d", nout, zeroed_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
