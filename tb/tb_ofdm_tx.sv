// tb_ofdm_tx: two transmitters (antennas 0 and 1) send two frames from the
// same start pulses with independent random data; a start pulse in the
// middle of the first frame must be ignored. Every output sample is compared
// with a floating-point model: pilot or Gray 16-QAM value per subcarrier,
// scaled IDCT, cyclic prefix. Also checks frame length, out_sof, that the
// samples are contiguous, and the start-to-first-sample latency (2N+5).
module tb_ofdm_tx;
  import ofdm_pkg::*;
  localparam int N = 64, CP = 16, NDATA = 4, NSYM = 2 + NDATA, NF = 2;
  localparam int FL = NSYM * (N + CP);
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0;
  logic [3:0] din [2];
  logic       din_req [2], busy [2], out_valid [2], out_sof [2];
  cplx_t      out_data [2];

  for (genvar a = 0; a < 2; a++) begin : g_tx
    ofdm_tx #(.TX_ID(a)) dut (
      .clk, .rst_n, .start, .din(din[a]), .din_req(din_req[a]), .busy(busy[a]),
      .out_valid(out_valid[a]), .out_sof(out_sof[a]), .out_data(out_data[a])
    );
  end

  int checks = 0, failures = 0;
  logic [3:0] bits [2][NF][NDATA*N];
  int nreq [2] = '{0, 0};
  int nout [2] = '{0, 0};
  int first_t [2][NF];
  int start_t [NF];
  int prev_t [2] = '{0, 0};
  int gaps = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int lvl(logic [1:0] b);
    return (b[1] ? 1 : -1) * (b[0] ? 1 : 3) * 512;
  endfunction

  // Frequency-domain value of subcarrier k in symbol s of frame f, antenna a.
  function automatic void freq(int a, int f, int s, int k, output real xr, output real xi);
    if (s < 2) begin
      real sg;
      sg = (a == 1 && s == 1) ? -1.0 : 1.0;
      xr = sg * (PILOT_PAT[2*k]   ? -512.0 : 512.0);
      xi = sg * (PILOT_PAT[2*k+1] ? -512.0 : 512.0);
    end else begin
      logic [3:0] b;
      b = bits[a][f][(s-2)*N + k];
      xr = real'(lvl(b[3:2]));
      xi = real'(lvl(b[1:0]));
    end
  endfunction

  task automatic check_out(int a, int t);
    int f, s, p, n;
    real er, ei;
    sample_t dr, di;
    f = nout[a] / FL;
    s = (nout[a] % FL) / (N + CP);
    p = nout[a] % (N + CP);
    n = p < CP ? N - CP + p : p - CP;
    er = 0.0; ei = 0.0;
    for (int k = 0; k < N; k++) begin
      real xr, xi, c;
      freq(a, f, s, k, xr, xi);
      c = $cos(PI * real'((2*n+1)*k) / real'(2*N));
      if (k == 0) c = c / 2.0;
      er += xr * c;
      ei += xi * c;
    end
    er = er / 8.0;
    ei = ei / 8.0;
    dr = out_data[a].re;
    di = out_data[a].im;
    checks++;
    if (rabs(real'(dr) - er) > 4.0 || rabs(real'(di) - ei) > 4.0 ||
        out_sof[a] !== (nout[a] % FL == 0)) begin
      failures++;
      $display("tx%0d out %0d: got (%0d,%0d) sof %0d, expected (%f,%f)",
               a, nout[a], dr, di, out_sof[a], er, ei);
    end
    if (nout[a] % FL == 0) first_t[a][f] = t;
    else if (t != prev_t[a] + 1) gaps++;
    prev_t[a] = t;
    nout[a]++;
  endtask

  initial begin
    int t;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    t = 0;
    while ((nout[0] < NF*FL || nout[1] < NF*FL) && t < 10000) begin
      @(posedge clk);
      #1;
      t++;
      for (int a = 0; a < 2; a++) if (out_valid[a]) check_out(a, t);
      // start pulses: frame 0, an ignored one mid-frame, frame 1 after the end
      start = (t == 3) || (t == 200) || (t == FL + 400);
      if (t == 3) start_t[0] = t;
      if (t == FL + 400) start_t[1] = t;
      for (int a = 0; a < 2; a++) begin
        din[a] = 4'($urandom);
        if (din_req[a]) begin
          bits[a][nreq[a] / (NDATA*N)][nreq[a] % (NDATA*N)] = din[a];
          nreq[a]++;
        end
      end
    end
    for (int a = 0; a < 2; a++) begin
      checks++;
      if (nout[a] != NF*FL || nreq[a] != NF*NDATA*N) begin
        failures++;
        $display("tx%0d: %0d samples, %0d data symbols", a, nout[a], nreq[a]);
      end
      for (int f = 0; f < NF; f++) begin
        checks++;
        if (first_t[a][f] - start_t[f] != 2*N + 5) begin
          failures++;
          $display("tx%0d frame %0d latency %0d", a, f, first_t[a][f] - start_t[f]);
        end
      end
    end
    checks++;
    if (gaps != 0) begin
      failures++;
      $display("%0d gaps inside frames", gaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
