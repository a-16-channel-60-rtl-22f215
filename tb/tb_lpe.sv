// tb_lpe: exhaustive check of the lightweight phase extractor.
//
// Every pair of 10b inputs (re, im) is applied, one per clock; the phase that
// appears one clock later is compared with atan2(im, re)/pi computed in
// floating point. The error, taken modulo 2 (the phase wraps at +-pi), must
// stay within 1 LSB. The one-clock latency is checked via out_valid. The
// worst error found is printed.
module tb_lpe;
  import nsp_pkg::*;

  localparam int IN_W = 10;
  localparam int PH_W = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0] re = '0, im = '0;
  logic out_valid;
  logic signed [PH_W-1:0] phase;

  int checks = 0, failures = 0;
  real worst = 0.0;

  lpe #(.IN_W(IN_W), .PH_W(PH_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: ideal phase in LSBs, and wrapped error
  function automatic real ref_lsb(int r, int i);
    if (r == 0 && i == 0) return 0.0;
    return $atan2(real'(i), real'(r)) / PI * real'(2 ** (PH_W - 1));
  endfunction

  function automatic real wrap_err(real e);
    real full = real'(2 ** PH_W);
    while (e >  full / 2.0) e -= full;
    while (e < -full / 2.0) e += full;
    return e;
  endfunction

  logic signed [IN_W-1:0] re_d, im_d;
  logic                   v_d = 1'b0;

  always @(posedge clk) begin
    re_d <= re;
    im_d <= im;
    v_d  <= in_valid;
    if (rst_n) begin
      // latency: out_valid must follow in_valid by exactly one clock
      if (out_valid !== v_d) begin
        failures++;
        $display("latency mismatch");
      end
      if (v_d) begin
        real e;
        e = wrap_err(real'(phase) - ref_lsb(int'(re_d), int'(im_d)));
        checks++;
        if (e < 0.0) e = -e;
        if (e > worst) worst = e;
        if (e > 1.0) begin
          failures++;
          if (failures < 10)
            $display("re=%0d im=%0d phase=%0d ref=%f", re_d, im_d, phase,
                     ref_lsb(int'(re_d), int'(im_d)));
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = -(2 ** (IN_W - 1)); r < 2 ** (IN_W - 1); r++) begin
      for (int i = -(2 ** (IN_W - 1)); i < 2 ** (IN_W - 1); i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        re = IN_W'(r);
        im = IN_W'(i);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    $display("worst phase error %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
