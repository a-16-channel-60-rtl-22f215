// tb_linf_norm: checks max(|x|,|y|) on corner cases and random pairs.
module tb_linf_norm;
  localparam int W = 10;
  logic signed [W-1:0] x, y;
  logic [W-1:0] mag;
  int checks = 0, failures = 0;

  linf_norm #(.W(W)) dut (.*);

  task automatic check(int xi, int yi);
    int ax, ay, e;
    x = W'(xi); y = W'(yi);
    #1;
    ax = xi < 0 ? -xi : xi;
    ay = yi < 0 ? -yi : yi;
    e  = ax > ay ? ax : ay;
    checks++;
    if (int'(mag) != e) begin
      failures++;
      $display("x=%0d y=%0d mag=%0d expected %0d", xi, yi, mag, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(-512, 0); check(0, -512); check(511, -512);
    check(-3, 2); check(2, -3); check(-511, 511);
    repeat (2000) check($signed(W'($urandom)), $signed(W'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
