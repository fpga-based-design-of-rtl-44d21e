// tb_dct_smoother: random coefficient stream; every output must equal the
// input of the previous cycle, with the coefficients at index >= W set to
// zero and flagged.
module tb_dct_smoother;
  import ofdm_pkg::*;
  localparam int BLK = 8, W = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0;
  logic [2:0]    in_idx = '0;
  cplx_t         in_data = '0;
  logic [1:0]    in_tag = '0;
  logic          out_valid, out_zeroed;
  logic [2:0]    out_idx;
  cplx_t         out_data;
  logic [1:0]    out_tag;
  int checks = 0, failures = 0, nzero = 0;

  dct_smoother #(.BLK(BLK), .W(W), .TAG_W(2)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic  pv;
    logic [2:0] pidx;
    cplx_t pd;
    logic [1:0] ptag;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    pv = 0; pidx = 0; pd = '0; ptag = 0;
    for (int t = 0; t < 400; t++) begin
      @(posedge clk);
      #1;
      // check what the dut registered from the previous cycle's input
      if (t > 0) begin
        cplx_t exp_d;
        exp_d = (int'(pidx) < W) ? pd : '0;
        checks++;
        if (out_valid !== pv || (pv && (out_idx !== pidx || out_data !== exp_d ||
            out_tag !== ptag || out_zeroed !== (int'(pidx) >= W)))) begin
          failures++;
          $display("t=%0d mismatch idx %0d data %h exp %h", t, out_idx, out_data, exp_d);
        end
        if (pv && out_zeroed) nzero++;
      end
      pv = ($urandom_range(0, 4) != 0);
      pidx = 3'(t);
      pd.re = 16'($urandom);
      pd.im = 16'($urandom);
      ptag = 2'($urandom);
      in_valid <= pv;
      in_idx   <= pidx;
      in_data  <= pd;
      in_tag   <= ptag;
    end
    checks++;
    if (nzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
