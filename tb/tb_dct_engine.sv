// tb_dct_engine: drives three engines (8-point DCT, 8-point IDCT and 64-point
// DCT) with the same random complex stream, first back to back and then
// with random gaps, and compares every result with a floating-point DCT
// computed here. Also checks the 2-cycle latency and the block tags.
module tb_dct_engine;
  import ofdm_pkg::*;

  localparam int NBLK64 = 6;
  localparam int NTOT   = 64 * NBLK64;
  localparam real PI    = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid = 0;
  cplx_t in_data  = '0;
  logic  in_tag   = 0;

  logic        v_f8, v_i8, v_f64;
  logic [2:0]  x_f8, x_i8;
  logic [5:0]  x_f64;
  cplx_t       d_f8, d_i8, d_f64;
  logic        t_f8, t_i8, t_f64;

  dct_engine #(.N(8),  .INVERSE(1'b0), .SHIFT(2), .TAG_W(1)) u_f8
    (.clk, .rst_n, .in_valid, .in_data, .in_tag,
     .out_valid(v_f8), .out_idx(x_f8), .out_data(d_f8), .out_tag(t_f8));
  dct_engine #(.N(8),  .INVERSE(1'b1), .SHIFT(0), .TAG_W(1)) u_i8
    (.clk, .rst_n, .in_valid, .in_data, .in_tag,
     .out_valid(v_i8), .out_idx(x_i8), .out_data(d_i8), .out_tag(t_i8));
  dct_engine #(.N(64), .INVERSE(1'b0), .SHIFT(5), .TAG_W(1)) u_f64
    (.clk, .rst_n, .in_valid, .in_data, .in_tag,
     .out_valid(v_f64), .out_idx(x_f64), .out_data(d_f64), .out_tag(t_f64));

  int checks = 0, failures = 0;
  cplx_t hist [NTOT];
  int    nin = 0;
  int    cnt_f8 = 0, cnt_i8 = 0, cnt_f64 = 0;
  int    cyc = 0, last_in_cyc8 = -100, lat_checked = 0;

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

  // Floating-point reference for one result.
  function automatic real ref_part(int n_pt, bit inv, int shift, int blk,
                                   int idx, bit im);
    real s = 0.0;
    for (int m = 0; m < n_pt; m++) begin
      real v, c;
      int n, k;
      v = im ? real'(hist[blk*n_pt+m].im) : real'(hist[blk*n_pt+m].re);
      n = inv ? idx : m;
      k = inv ? m : idx;
      c = $cos(PI * real'((2*n+1)*k) / real'(2*n_pt));
      if (inv && m == 0) c = c / 2.0;
      s += v * c;
    end
    return s / real'(1 << shift);
  endfunction

  task automatic check(string nm, int n_pt, bit inv, int shift, int cnt,
                       int idx, cplx_t d, logic tag);
    real er, ei;
    int blk;
    sample_t dre, dim;
    logic etag;
    blk = cnt / n_pt;
    // tag is the parity of the 8-sample group; a block ends on its last one
    etag = (n_pt == 8) ? blk[0] : 1'b1;
    er = ref_part(n_pt, inv, shift, blk, idx, 0);
    ei = ref_part(n_pt, inv, shift, blk, idx, 1);
    dre = d.re;
    dim = d.im;
    checks++;
    if (idx != cnt % n_pt || tag != etag ||
        rabs(real'(dre) - er) > 2.5 || rabs(real'(dim) - ei) > 2.5) begin
      failures++;
      $display("%s blk %0d idx %0d: got (%0d,%0d) tag %0d, expected (%f,%f) tag %0d",
               nm, blk, idx, dre, dim, tag, er, ei, etag);
    end
  endtask

  int sampled = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid) begin
      if (sampled % 8 == 7) last_in_cyc8 <= cyc;
      sampled <= sampled + 1;
    end
    if (v_f8) begin
      if (cnt_f8 % 8 == 0 && lat_checked < 4) begin
        checks++;
        lat_checked++;
        if (cyc - last_in_cyc8 != 2) begin
          failures++;
          $display("latency %0d, expected 2", cyc - last_in_cyc8);
        end
      end
      check("dct8", 8, 0, 2, cnt_f8, int'(x_f8), d_f8, t_f8);
      cnt_f8 <= cnt_f8 + 1;
    end
    if (v_i8) begin
      check("idct8", 8, 1, 0, cnt_i8, int'(x_i8), d_i8, t_i8);
      cnt_i8 <= cnt_i8 + 1;
    end
    if (v_f64) begin
      check("dct64", 64, 0, 5, cnt_f64, int'(x_f64), d_f64, t_f64);
      cnt_f64 <= cnt_f64 + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (nin < NTOT) begin
      bit gap;
      gap = (nin >= NTOT / 2) && ($urandom_range(0, 3) == 0);
      if (gap) begin
        in_valid <= 0;
      end else begin
        cplx_t s;
        s.re = 16'(int'($urandom_range(0, 6000)) - 3000);
        s.im = 16'(int'($urandom_range(0, 6000)) - 3000);
        hist[nin] = s;
        in_valid <= 1;
        in_data  <= s;
        in_tag   <= 1'((nin / 8) % 2);
        nin++;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (100) @(posedge clk);
    checks++;
    if (cnt_f8 != NTOT || cnt_i8 != NTOT || cnt_f64 != NTOT) begin
      failures++;
      $display("output counts %0d %0d %0d, expected %0d", cnt_f8, cnt_i8, cnt_f64, NTOT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
