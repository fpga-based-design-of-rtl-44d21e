// tb_cos_rom: reads every one of the 256 phases through all ports and
// compares with round(16384*cos(2*pi*p/256)) computed with $cos.
module tb_cos_rom;
  localparam int NPORT = 4;
  logic        [7:0]  phase [NPORT];
  logic signed [15:0] value [NPORT];
  int checks = 0, failures = 0;

  cos_rom #(.NPORT(NPORT)) dut (.phase(phase), .value(value));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p += NPORT) begin
      for (int i = 0; i < NPORT; i++) phase[i] = 8'(p + i);
      #1;
      for (int i = 0; i < NPORT; i++) begin
        real c;
        int  e;
        c = 16384.0 * $cos(2.0 * 3.14159265358979 * real'(p + i) / 256.0);
        e = int'(c);
        checks++;
        if (int'(value[i]) - e > 1 || e - int'(value[i]) > 1) begin
          failures++;
          $display("phase %0d: got %0d expected %0d", p + i, value[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
