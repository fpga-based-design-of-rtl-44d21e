// tb_cp_remove: two frames of five N+CP-sample symbols with random gaps; the
// second frame is cut short by a new in_sof after three symbols. Only the
// last N samples of each symbol may come out, with the right position and
// symbol number.
module tb_cp_remove;
  import ofdm_pkg::*;
  localparam int N = 64, CP = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0, in_sof = 0;
  cplx_t      in_data = '0;
  logic       out_valid;
  logic [5:0] out_idx;
  logic [7:0] out_sym;
  cplx_t      out_data;

  cp_remove #(.N(N), .CP(CP), .SYM_W(8)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected output of the sample driven one iteration earlier
    logic  exp_v;
    int    exp_idx, exp_sym, nexp;
    cplx_t exp_d;
    int    frame_len [3] = '{2*(N+CP) + 5, 3*(N+CP), 5*(N+CP)};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    exp_v = 0; nexp = 0;
    for (int f = 0; f < 3; f++) begin
      int p;
      p = 0;
      while (p < frame_len[f]) begin
        @(posedge clk);
        #1;
        checks++;
        if (out_valid !== exp_v || (exp_v && (int'(out_idx) != exp_idx ||
            int'(out_sym) != exp_sym || out_data !== exp_d))) begin
          failures++;
          $display("frame %0d pos %0d: got v%0d idx %0d sym %0d", f, p, out_valid, out_idx, out_sym);
        end
        in_valid = ($urandom_range(0, 4) != 0);
        exp_v = 0;
        if (in_valid) begin
          in_sof = (p == 0);
          in_data.re = 16'($urandom);
          in_data.im = 16'($urandom);
          exp_v   = (p % (N+CP)) >= CP;
          exp_idx = p % (N+CP) - CP;
          exp_sym = p / (N+CP);
          exp_d   = in_data;
          if (exp_v) nexp++;
          p++;
        end
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== exp_v || nexp != (2 + 3 + 5) * N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
