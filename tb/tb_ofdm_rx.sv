// tb_ofdm_rx: builds two received frames directly in the time domain: the
// frequency-domain symbols (two preamble symbols made from smooth
// frequency-selective channels H0, H1 and the pilots, then random 16-QAM
// data) go through a floating-point scaled IDCT and get a cyclic prefix.
// Checks the data symbols, the LS estimates of both links and the smoothed
// DCT estimates (against a floating-point block DCT / keep W / IDCT of the
// true channel), their order and tags, and the count of removed
// coefficients.
module tb_ofdm_rx;
  import ofdm_pkg::*;
  localparam int N = 64, CP = 16, NDATA = 4, NSYM = 2 + NDATA, NF = 2;
  localparam int BLK = 8, W = 4;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, in_sof = 0;
  cplx_t      in_data = '0;
  logic       rx_valid, ls_valid, ls_tx, h_valid, h_tx;
  logic [7:0] rx_sym;
  logic [5:0] rx_sc, ls_sc, h_sc;
  cplx_t      rx_data, ls_data, h_data;
  logic [31:0] zeroed_cnt;

  ofdm_rx dut (.*);

  int checks = 0, failures = 0;
  real yr [NF][NSYM][N], yi [NF][NSYM][N];
  real hr [NF][2][N], hi [NF][2][N];     // true channels
  real sr [NF][2][N], si [NF][2][N];     // smoothed true channels
  int  n_rx = 0, n_ls = 0, n_h = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic bit near(cplx_t d, real er, real ei, real tol);
    sample_t dr, di;
    dr = d.re;
    di = d.im;
    return rabs(real'(dr) - er) <= tol && rabs(real'(di) - ei) <= tol;
  endfunction

  // Block DCT smoothing of the true channel (the estimator's ideal output).
  task automatic smooth(int f, int a);
    for (int b = 0; b < N / BLK; b++) begin
      real fr [BLK], fi [BLK];
      for (int k = 0; k < BLK; k++) begin
        fr[k] = 0.0; fi[k] = 0.0;
        for (int n = 0; n < BLK; n++) begin
          real c;
          c = $cos(PI * real'((2*n+1)*k) / real'(2*BLK)) * 2.0 / real'(BLK);
          fr[k] += hr[f][a][b*BLK+n] * c;
          fi[k] += hi[f][a][b*BLK+n] * c;
        end
      end
      for (int n = 0; n < BLK; n++) begin
        real accr, acci;
        accr = fr[0] / 2.0; acci = fi[0] / 2.0;
        for (int k = 1; k < W; k++) begin
          real c;
          c = $cos(PI * real'((2*n+1)*k) / real'(2*BLK));
          accr += fr[k] * c;
          acci += fi[k] * c;
        end
        sr[f][a][b*BLK+n] = accr;
        si[f][a][b*BLK+n] = acci;
      end
    end
  endtask

  task automatic observe();
    if (rx_valid) begin
      int f, s, k;
      f = n_rx / (NDATA*N);
      s = (n_rx % (NDATA*N)) / N;
      k = n_rx % N;
      checks++;
      if (int'(rx_sym) != s || int'(rx_sc) != k || !near(rx_data, yr[f][s+2][k], yi[f][s+2][k], 4.0)) begin
        failures++;
        $display("rx %0d: sym %0d sc %0d %h, expected (%f,%f)", n_rx, rx_sym, rx_sc, rx_data,
                 yr[f][s+2][k], yi[f][s+2][k]);
      end
      n_rx++;
    end
    if (ls_valid) begin
      int f, a, k;
      f = n_ls / (2*N);
      a = (n_ls % (2*N)) / N;
      k = n_ls % N;
      checks++;
      if (int'(ls_tx) != a || int'(ls_sc) != k || !near(ls_data, hr[f][a][k], hi[f][a][k], 4.0)) begin
        failures++;
        $display("ls %0d: tx %0d sc %0d %h, expected (%f,%f)", n_ls, ls_tx, ls_sc, ls_data,
                 hr[f][a][k], hi[f][a][k]);
      end
      n_ls++;
    end
    if (h_valid) begin
      int f, a, k;
      f = n_h / (2*N);
      a = (n_h % (2*N)) / N;
      k = n_h % N;
      checks++;
      if (int'(h_tx) != a || int'(h_sc) != k || !near(h_data, sr[f][a][k], si[f][a][k], 6.0)) begin
        failures++;
        $display("h %0d: tx %0d sc %0d %h, expected (%f,%f)", n_h, h_tx, h_sc, h_data,
                 sr[f][a][k], si[f][a][k]);
      end
      n_h++;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NF; f++) begin
      // smooth frequency-selective channels, about unit gain
      for (int a = 0; a < 2; a++) begin
        real ar, ai, br, bi, m;
        ar = real'($urandom_range(0, 600)) - 300.0;
        ai = real'($urandom_range(0, 600)) - 300.0;
        br = real'($urandom_range(0, 200)) - 100.0;
        bi = real'($urandom_range(0, 200)) - 100.0;
        m  = real'($urandom_range(1, 3));
        for (int k = 0; k < N; k++) begin
          hr[f][a][k] = ar + br * $cos(PI * m * real'(k) / real'(N));
          hi[f][a][k] = ai + bi * $sin(PI * m * real'(k) / real'(N));
        end
        smooth(f, a);
      end
      for (int k = 0; k < N; k++) begin
        real pr, pi;
        pr = PILOT_PAT[2*k]   ? -1.0 : 1.0;
        pi = PILOT_PAT[2*k+1] ? -1.0 : 1.0;
        for (int s = 0; s < 2; s++) begin
          real gr, gi;
          gr = s == 0 ? hr[f][0][k] + hr[f][1][k] : hr[f][0][k] - hr[f][1][k];
          gi = s == 0 ? hi[f][0][k] + hi[f][1][k] : hi[f][0][k] - hi[f][1][k];
          yr[f][s][k] = pr*gr - pi*gi;
          yi[f][s][k] = pr*gi + pi*gr;
        end
        for (int s = 2; s < NSYM; s++) begin
          yr[f][s][k] = real'(512 * (2 * int'($urandom_range(0, 3)) - 3));
          yi[f][s][k] = real'(512 * (2 * int'($urandom_range(0, 3)) - 3));
        end
      end
      // time domain, one sample per cycle
      for (int s = 0; s < NSYM; s++) begin
        real xr [N], xi [N];
        for (int n = 0; n < N; n++) begin
          xr[n] = 0.0; xi[n] = 0.0;
          for (int k = 0; k < N; k++) begin
            real c;
            c = $cos(PI * real'((2*n+1)*k) / real'(2*N));
            if (k == 0) c = c / 2.0;
            xr[n] += yr[f][s][k] * c;
            xi[n] += yi[f][s][k] * c;
          end
          xr[n] = xr[n] / 8.0;
          xi[n] = xi[n] / 8.0;
        end
        for (int p = 0; p < N + CP; p++) begin
          int n;
          @(posedge clk);
          #1;
          observe();
          n = p < CP ? N - CP + p : p - CP;
          in_valid = 1;
          in_sof   = (s == 0 && p == 0);
          in_data.re = 16'(int'($rtoi(xr[n] + (xr[n] < 0.0 ? -0.5 : 0.5))));
          in_data.im = 16'(int'($rtoi(xi[n] + (xi[n] < 0.0 ? -0.5 : 0.5))));
        end
      end
    end
    repeat (300) begin
      @(posedge clk);
      #1;
      observe();
      in_valid = 0;
    end
    checks++;
    if (n_rx != NF*NDATA*N || n_ls != NF*2*N || n_h != NF*2*N ||
        zeroed_cnt != 32'(NF*2*N/BLK*(BLK-W))) begin
      failures++;
      $display("counts rx %0d ls %0d h %0d zeroed %0d", n_rx, n_ls, n_h, zeroed_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
