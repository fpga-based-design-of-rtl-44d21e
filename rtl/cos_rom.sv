// cos_rom: cosine coefficient memory of the DCT/IDCT engines.
//
// The cosine values are kept as a table in a memory that is loaded from a
// hex file, as in the source design. To keep the table small this design
// stores a quarter wave only: entry p (p = 0..64) holds
//   round(16384 * cos(2*pi*p/256))          (signed, 14 fraction bits)
// and every other phase is folded onto it by symmetry. A full period is 256
// phase steps, which serves every power-of-two transform size up to 64.
//
// Interface: NPORT independent combinational read ports. Port i takes an
// 8-bit phase and returns cos(2*pi*phase/256). No clock, no latency.
// The table file is read from rtl/cos_qw.hex relative to the simulation
// or synthesis working directory (the repository root).
module cos_rom #(
  parameter int NPORT = 8
) (
  input  logic        [7:0]  phase [NPORT],
  output logic signed [15:0] value [NPORT]
);

  logic signed [15:0] qw [0:64];

  initial $readmemh("rtl/cos_qw.hex", qw);

  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      logic [5:0] r;
      r = phase[i][5:0];
      unique case (phase[i][7:6])
        2'd0: value[i] = qw[{1'b0, r}];
        2'd1: value[i] = -qw[7'd64 - {1'b0, r}];
        2'd2: value[i] = -qw[{1'b0, r}];
        default: value[i] = qw[7'd64 - {1'b0, r}];
      endcase
    end
  end

endmodule
