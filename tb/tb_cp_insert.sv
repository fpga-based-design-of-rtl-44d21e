// tb_cp_insert: six 64-sample symbols, the first three at the full rate of
// one symbol per N+CP cycles, the others with random gaps. Every output
// symbol must be the last CP input samples followed by all N, out_sof only
// on the first sample, and the first three must leave as one unbroken run.
module tb_cp_insert;
  import ofdm_pkg::*;
  localparam int N = 64, CP = 16, NS = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid = 0, in_sof = 0;
  cplx_t in_data = '0;
  logic  out_valid, out_sof;
  cplx_t out_data;

  cp_insert #(.N(N), .CP(CP)) dut (.*);

  int checks = 0, failures = 0;
  cplx_t sent [NS*N];
  int nout = 0, first_t = -1, t3 = -1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nin, t, slot;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    nin = 0; t = 0; slot = 0;  // slot: cycles of the full-rate phase
    while (nout < NS*(N+CP) && t < 10000) begin
      @(posedge clk);
      #1;
      t++;
      if (out_valid) begin
        int s, p, src;
        s = nout / (N+CP);
        p = nout % (N+CP);
        src = s*N + (p < CP ? N - CP + p : p - CP);
        checks++;
        if (out_data !== sent[src] || out_sof !== (nout == 0)) begin
          failures++;
          $display("out %0d: got %h sof %0d, expected %h", nout, out_data, out_sof, sent[src]);
        end
        if (nout == 0) first_t = t;
        if (nout == 3*(N+CP) - 1) t3 = t;
        nout++;
      end
      in_valid = 0;
      in_sof = 0;
      if (slot < 3*(N+CP)) begin
        // full rate: N samples, then CP idle cycles
        if (slot % (N+CP) < N) in_valid = 1;
        slot++;
      end else if (nin < NS*N) begin
        in_valid = ($urandom_range(0, 3) == 0);
      end
      if (in_valid) begin
        cplx_t s;
        s.re = 16'($urandom);
        s.im = 16'($urandom);
        sent[nin] = s;
        in_data = s;
        in_sof = (nin == 0);
        nin++;
      end
    end
    checks++;
    if (nout != NS*(N+CP) || t3 - first_t != 3*(N+CP) - 1) begin
      failures++;
      $display("outputs %0d, first three symbols took %0d cycles", nout, t3 - first_t + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
