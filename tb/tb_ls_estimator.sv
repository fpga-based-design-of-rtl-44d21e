// tb_ls_estimator: builds the two received preamble symbols of a 2x1 link,
// Y0 = P(H0+H1) + E0 and Y1 = P(H0-H1) + E1, from random channels H0, H1
// and small noise, feeds them with random gaps, and checks the N estimates
// of link 0 (during symbol 1) and the N of link 1 (replayed afterwards,
// back to back) against conj(P)(Y0 +- Y1)/4 computed in floating point.
module tb_ls_estimator;
  import ofdm_pkg::*;
  localparam int N = 64, NF = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, in_sym = 0;
  logic [5:0] in_sc = '0;
  cplx_t      in_data = '0;
  logic       out_valid, out_tx;
  logic [5:0] out_sc;
  cplx_t      out_data;

  ls_estimator #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  real y0r [N], y0i [N], y1r [N], y1i [N];
  int  nout = 0, last_h1_t = -10, h1_gaps = 0, t = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check_out();
    int k, tx;
    real sr, si, ar, ai, er, ei;
    sample_t dr, di;
    tx = (nout % (2*N)) / N;
    k  = nout % N;
    sr = PILOT_PAT[2*k]   ? -1.0 : 1.0;
    si = PILOT_PAT[2*k+1] ? -1.0 : 1.0;
    ar = tx == 0 ? y0r[k] + y1r[k] : y0r[k] - y1r[k];
    ai = tx == 0 ? y0i[k] + y1i[k] : y0i[k] - y1i[k];
    er = (sr*ar + si*ai) / 4.0;
    ei = (sr*ai - si*ar) / 4.0;
    dr = out_data.re;
    di = out_data.im;
    checks++;
    if (int'(out_tx) != tx || int'(out_sc) != k ||
        rabs(real'(dr) - er) > 0.75 || rabs(real'(di) - ei) > 0.75) begin
      failures++;
      $display("out %0d: tx %0d sc %0d (%0d,%0d), expected tx %0d sc %0d (%f,%f)",
               nout, out_tx, out_sc, dr, di, tx, k, er, ei);
    end
    if (tx == 1) begin
      if (k > 0 && t != last_h1_t + 1) h1_gaps++;
      last_h1_t = t;
    end
    nout++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NF; f++) begin
      int hr0 [N], hi0 [N], hr1 [N], hi1 [N];
      for (int k = 0; k < N; k++) begin
        hr0[k] = int'($urandom_range(0, 8000)) - 4000;
        hi0[k] = int'($urandom_range(0, 8000)) - 4000;
        hr1[k] = int'($urandom_range(0, 8000)) - 4000;
        hi1[k] = int'($urandom_range(0, 8000)) - 4000;
      end
      for (int s = 0; s < 2; s++) begin
        int k;
        k = 0;
        while (k < N) begin
          @(posedge clk);
          #1;
          t++;
          if (out_valid) check_out();
          in_valid = ($urandom_range(0, 3) != 0);
          if (in_valid) begin
            int sr, si, ar, ai, yr, yi;
            sr = PILOT_PAT[2*k]   ? -1 : 1;
            si = PILOT_PAT[2*k+1] ? -1 : 1;
            ar = s == 0 ? hr0[k] + hr1[k] : hr0[k] - hr1[k];
            ai = s == 0 ? hi0[k] + hi1[k] : hi0[k] - hi1[k];
            yr = sr*ar - si*ai + int'($urandom_range(0, 40)) - 20;
            yi = sr*ai + si*ar + int'($urandom_range(0, 40)) - 20;
            if (s == 0) begin y0r[k] = real'(yr); y0i[k] = real'(yi); end
            else        begin y1r[k] = real'(yr); y1i[k] = real'(yi); end
            in_sym  = s[0];
            in_sc   = 6'(k);
            in_data = {16'(yr), 16'(yi)};
            k++;
          end
        end
      end
      repeat (N + 10) begin
        @(posedge clk);
        #1;
        t++;
        if (out_valid) check_out();
        in_valid = 0;
      end
    end
    checks++;
    if (nout != NF*2*N || h1_gaps != 0) begin
      failures++;
      $display("outputs %0d, gaps in replay %0d", nout, h1_gaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
