// tb_mimo_ofdm_top: end-to-end run of the 2x1 link at the default sizes
// (64 subcarriers, 16-sample prefix, 4 data symbols, 8-point DCT blocks,
// W = 4). A channel model between the transmit outputs and the receive input
// applies one complex gain per transmit antenna and, in the second and
// third frames, uniform noise. Frame 1 (no noise) checks every received data
// symbol against h0*X0 + h1*X1 and both channel estimates against h0, h1.
// The noisy frames check that the DCT-smoothed estimate has a lower mean
// square error than the LS estimate. Counts each mechanism: frames sent and
// received, preambles used for LS on both links, smoothing-coefficient
// removal and the noise reduction.
module tb_mimo_ofdm_top;
  import ofdm_pkg::*;
  localparam int N = 64, NDATA = 4, NF = 3, BLK = 8, W = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0;
  logic [3:0] din0 = '0, din1 = '0;
  logic       din_req0, din_req1, tx_busy;
  logic       tx0_valid, tx0_sof, tx1_valid, tx1_sof;
  cplx_t      tx0_data, tx1_data;
  logic       rx_in_valid = 0, rx_in_sof = 0;
  cplx_t      rx_in_data = '0;
  logic       rx_valid, ls_valid, ls_tx, h_valid, h_tx;
  logic [7:0] rx_sym;
  logic [5:0] rx_sc, ls_sc, h_sc;
  cplx_t      rx_data, ls_data, h_data;
  logic [31:0] zeroed_cnt;

  mimo_ofdm_top dut (.*);

  int checks = 0, failures = 0;
  int hr [NF][2], hi [NF][2];
  int noise_amp [NF] = '{0, 64, 128};
  logic [3:0] bits [NF][2][NDATA*N];
  int nreq = 0, n_rx = 0, n_ls = 0, n_h = 0, n_sof = 0, frame_ch = 0;
  real mse_ls [NF], mse_h [NF];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int lvl(logic [1:0] b);
    return (b[1] ? 1 : -1) * (b[0] ? 1 : 3) * 512;
  endfunction

  function automatic int rnd_shift9(longint v);
    return int'((v + 256) >>> 9);
  endfunction

  // Channel model: y = h0*x0 + h1*x1 (+ noise), one register stage.
  always @(posedge clk) begin
    longint yr, yi;
    int f, nz;
    f = frame_ch;
    if (tx0_sof) begin
      f = n_sof;
      frame_ch <= n_sof;
      n_sof <= n_sof + 1;
    end
    if (f >= NF) f = NF - 1;
    yr = longint'(hr[f][0]) * tx0_data.re - longint'(hi[f][0]) * tx0_data.im
       + longint'(hr[f][1]) * tx1_data.re - longint'(hi[f][1]) * tx1_data.im;
    yi = longint'(hr[f][0]) * tx0_data.im + longint'(hi[f][0]) * tx0_data.re
       + longint'(hr[f][1]) * tx1_data.im + longint'(hi[f][1]) * tx1_data.re;
    nz = noise_amp[f];
    rx_in_valid     <= tx0_valid;
    rx_in_sof       <= tx0_sof;
    rx_in_data.re   <= 16'(rnd_shift9(yr) + int'($urandom_range(0, 2*nz)) - nz);
    rx_in_data.im   <= 16'(rnd_shift9(yi) + int'($urandom_range(0, 2*nz)) - nz);
  end

  task automatic observe();
    if (rx_valid) begin
      int f, s, k;
      real er, ei;
      sample_t dr, di;
      logic [3:0] b0, b1;
      f = n_rx / (NDATA*N);
      s = (n_rx % (NDATA*N)) / N;
      k = n_rx % N;
      b0 = bits[f][0][s*N+k];
      b1 = bits[f][1][s*N+k];
      er = (real'(hr[f][0]) * lvl(b0[3:2]) - real'(hi[f][0]) * lvl(b0[1:0])
          + real'(hr[f][1]) * lvl(b1[3:2]) - real'(hi[f][1]) * lvl(b1[1:0])) / 512.0;
      ei = (real'(hr[f][0]) * lvl(b0[1:0]) + real'(hi[f][0]) * lvl(b0[3:2])
          + real'(hr[f][1]) * lvl(b1[1:0]) + real'(hi[f][1]) * lvl(b1[3:2])) / 512.0;
      dr = rx_data.re;
      di = rx_data.im;
      if (noise_amp[f] == 0) begin
        checks++;
        if (int'(rx_sym) != s || int'(rx_sc) != k ||
            rabs(real'(dr) - er) > 6.0 || rabs(real'(di) - ei) > 6.0) begin
          failures++;
          $display("frame %0d data sym %0d sc %0d: got (%0d,%0d), expected (%f,%f)",
                   f, s, k, dr, di, er, ei);
        end
      end
      n_rx++;
    end
    if (ls_valid) begin
      int f, a;
      sample_t dr, di;
      f = n_ls / (2*N);
      a = (n_ls % (2*N)) / N;
      dr = ls_data.re;
      di = ls_data.im;
      mse_ls[f] += (real'(dr) - hr[f][a])**2 + (real'(di) - hi[f][a])**2;
      if (noise_amp[f] == 0) begin
        checks++;
        if (int'(ls_tx) != a || rabs(real'(dr) - hr[f][a]) > 4.0 || rabs(real'(di) - hi[f][a]) > 4.0) begin
          failures++;
          $display("frame %0d LS tx %0d sc %0d: got (%0d,%0d), expected (%0d,%0d)",
                   f, ls_tx, ls_sc, dr, di, hr[f][a], hi[f][a]);
        end
      end
      n_ls++;
    end
    if (h_valid) begin
      int f, a;
      sample_t dr, di;
      f = n_h / (2*N);
      a = (n_h % (2*N)) / N;
      dr = h_data.re;
      di = h_data.im;
      mse_h[f] += (real'(dr) - hr[f][a])**2 + (real'(di) - hi[f][a])**2;
      if (noise_amp[f] == 0) begin
        checks++;
        if (int'(h_tx) != a || int'(h_sc) != n_h % N ||
            rabs(real'(dr) - hr[f][a]) > 6.0 || rabs(real'(di) - hi[f][a]) > 6.0) begin
          failures++;
          $display("frame %0d DCT tx %0d sc %0d: got (%0d,%0d), expected (%0d,%0d)",
                   f, h_tx, h_sc, dr, di, hr[f][a], hi[f][a]);
        end
      end
      n_h++;
    end
  endtask

  // One cycle of the test: check the outputs, feed the transmitters.
  task automatic step();
    observe();
    din0 = 4'($urandom);
    din1 = 4'($urandom);
    if (din_req0) begin
      bits[nreq / (NDATA*N)][0][nreq % (NDATA*N)] = din0;
      bits[nreq / (NDATA*N)][1][nreq % (NDATA*N)] = din1;
      nreq++;
    end
    checks++;
    if (din_req0 !== din_req1) begin
      failures++;
      $display("transmitters out of step");
    end
  endtask

  initial begin
    int t;
    for (int f = 0; f < NF; f++) begin
      mse_ls[f] = 0.0;
      mse_h[f] = 0.0;
      for (int a = 0; a < 2; a++) begin
        hr[f][a] = int'($urandom_range(0, 600)) - 300;
        hi[f][a] = int'($urandom_range(0, 600)) - 300;
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    t = 0;
    for (int f = 0; f < NF; f++) begin
      int waited;
      start = 1;
      waited = 0;
      // run until this frame's estimates are out
      while (n_h < (f + 1) * 2 * N && waited < 5000) begin
        @(posedge clk);
        #1;
        t++;
        waited++;
        start = 0;
        step();
      end
      // let the last data symbol of the frame drain
      repeat (400) begin
        @(posedge clk);
        #1;
        step();
      end
    end
    for (int f = 1; f < NF; f++) begin
      checks++;
      mse_ls[f] = mse_ls[f] / real'(2*N);
      mse_h[f]  = mse_h[f] / real'(2*N);
      $display("frame %0d noise +-%0d: LS mse %f, DCT mse %f", f, noise_amp[f], mse_ls[f], mse_h[f]);
      if (!(mse_h[f] < 0.8 * mse_ls[f])) begin
        failures++;
        $display("DCT smoothing did not reduce the estimation error");
      end
    end
    // mechanism counts
    $display("frames sent %0d, data samples %0d, LS estimates %0d, DCT estimates %0d, coefficients removed %0d",
             n_sof, n_rx, n_ls, n_h, zeroed_cnt);
    checks++;
    if (n_sof != NF || n_rx != NF*NDATA*N || n_ls != NF*2*N || n_h != NF*2*N ||
        zeroed_cnt != 32'(NF*2*N/BLK*(BLK-W)) || nreq != NF*NDATA*N) begin
      failures++;
      $display("a mechanism did not happen the expected number of times");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
