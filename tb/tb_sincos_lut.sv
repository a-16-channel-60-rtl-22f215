// tb_sincos_lut: every phase code is compared with sin/cos computed in
// floating point (scaled by 2^9); the error must be within 1 LSB.
module tb_sincos_lut;
  localparam int PH_W = 10, OUT_F = 9;
  localparam real PI = 3.14159265358979323846;
  logic signed [PH_W-1:0] phase;
  logic signed [OUT_F:0]  sin_o, cos_o;
  int checks = 0, failures = 0;

  sincos_lut #(.PH_W(PH_W), .OUT_F(OUT_F)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = -(2**(PH_W-1)); p < 2**(PH_W-1); p++) begin
      real a, es, ec;
      phase = PH_W'(p);
      #1;
      a  = real'(p) / real'(2**(PH_W-1)) * PI;
      es = $sin(a) * 512.0 - real'(sin_o);
      ec = $cos(a) * 512.0 - real'(cos_o);
      checks += 2;
      if (es > 1.0 || es < -1.0) begin failures++; $display("sin p=%0d got %0d", p, sin_o); end
      if (ec > 1.0 || ec < -1.0) begin failures++; $display("cos p=%0d got %0d", p, cos_o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
