// cp_insert: guard interval (cyclic prefix) insertion of the transmitter.
//
// Each time-domain OFDM symbol of N samples is sent as N+CP samples: its
// last CP samples first, then the whole symbol, so that delayed echoes of
// the previous symbol fall into the guard interval. The cyclic prefix
// follows the source design; its length (default CP = N/4 = 16) is this
// design's choice, as the source asks only that it exceed the delay spread.
//
// How it works: a ping-pong buffer of two symbols. The writer fills one bank
// with the N samples of a symbol while the reader sends the other bank,
// starting at address N-CP. When the reader finishes a bank and the next one
// is already full it carries on without a gap, so symbols that arrive at
// least every N+CP cycles leave as one unbroken stream.
//
// Interface and timing: in_valid/in_data carry the N samples of a symbol in
// order (gaps allowed); in_sof marks the first sample of a frame's first
// symbol and is returned as out_sof on the first sample of its prefix. A
// full bank starts to be read on the next cycle; out_* are registered.
module cp_insert
  import ofdm_pkg::*;
#(
  parameter int N  = 64,
  parameter int CP = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_sof,
  input  cplx_t in_data,
  output logic  out_valid,
  output logic  out_sof,
  output cplx_t out_data
);

  localparam int IW = $clog2(N);
  localparam int PW = $clog2(N + CP);

  cplx_t         mem [2*N];
  logic          wr_bank, rd_bank, active;
  logic [IW-1:0] wr_idx;
  logic [PW-1:0] rd_pos;
  logic [1:0]    full, sof_flag;
  logic [IW-1:0] rd_addr;

  assign rd_addr = (int'(rd_pos) < CP) ? IW'(int'(rd_pos) + N - CP)
                                       : IW'(int'(rd_pos) - CP);

  // Writer.
  always_ff @(posedge clk) begin
    if (in_valid) mem[{wr_bank, wr_idx}] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_bank   <= 1'b0;
      wr_idx    <= '0;
      rd_bank   <= 1'b0;
      rd_pos    <= '0;
      active    <= 1'b0;
      full      <= '0;
      sof_flag  <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_data  <= '0;
    end else begin
      logic [1:0] full_n;
      full_n = full;
      if (in_valid) begin
        if (wr_idx == '0) sof_flag[wr_bank] <= in_sof;
        wr_idx <= wr_idx + 1'b1;
        if (wr_idx == IW'(N - 1)) begin
          full_n[wr_bank] = 1'b1;
          wr_bank <= ~wr_bank;
        end
      end
      // Reader.
      out_valid <= active;
      out_sof   <= active && rd_pos == '0 && sof_flag[rd_bank];
      out_data  <= mem[{rd_bank, rd_addr}];
      if (active) begin
        if (rd_pos == PW'(N + CP - 1)) begin
          full_n[rd_bank] = 1'b0;
          rd_bank <= ~rd_bank;
          rd_pos  <= '0;
          active  <= full[~rd_bank];
        end else begin
          rd_pos <= rd_pos + 1'b1;
        end
      end else if (full[rd_bank]) begin
        active <= 1'b1;
        rd_pos <= '0;
      end
      full <= full_n;
    end
  end

  // The writer must never overwrite a bank that has not been sent yet.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && wr_idx == '0) |-> !full[wr_bank]);

endmodule
