// cp_remove: guard interval removal and symbol framing of the receiver.
//
// The received stream is cut into OFDM symbols of N+CP samples; the first
// CP samples of each (the cyclic prefix) are dropped and the remaining N are
// passed on with their position in the symbol and the symbol's number in
// the frame. in_sof, given with the first sample of a frame, restarts both
// counters: the design assumes ideal frame synchronisation, which the source
// design does not treat.
//
// Interface and timing: valid-qualified samples in; out_* registered, one
// clock after the input. out_sym wraps after 2^SYM_W symbols.
module cp_remove
  import ofdm_pkg::*;
#(
  parameter int N     = 64,
  parameter int CP    = 16,
  parameter int SYM_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sof,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output logic [SYM_W-1:0]     out_sym,
  output cplx_t                out_data
);

  localparam int PW = $clog2(N + CP);

  logic [PW-1:0]    pos;
  logic [SYM_W-1:0] sym;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos       <= '0;
      sym       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_sym   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        logic [PW-1:0]    p;
        logic [SYM_W-1:0] s;
        p = in_sof ? '0 : pos;
        s = in_sof ? '0 : sym;
        out_valid <= (int'(p) >= CP);
        out_idx   <= $clog2(N)'(int'(p) - CP);
        out_sym   <= s;
        out_data  <= in_data;
        if (p == PW'(N + CP - 1)) begin
          pos <= '0;
          sym <= s + 1'b1;
        end else begin
          pos <= p + 1'b1;
          sym <= s;
        end
      end
    end
  end

endmodule
