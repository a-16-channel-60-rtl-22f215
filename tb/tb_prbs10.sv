// tb_prbs10: the sequence must hold while step is low, visit 1023 distinct
// non-zero states and repeat after exactly 1023 steps; the first steps are
// compared with a bit-serial model of x^10 + x^7 + 1.
module tb_prbs10;
  logic clk = 0, rst_n = 0, step = 0;
  logic [9:0] value;
  int checks = 0, failures = 0;
  bit seen [1024];

  prbs10 dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [9:0] model, first;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(value == 10'h001, "seed");
    repeat (3) @(negedge clk);
    check(value == 10'h001, "hold without step");
    first = value;
    model = value;
    step = 1;
    for (int n = 1; n <= 1023; n++) begin
      @(negedge clk);
      // model: new bit = b9 xor b6 shifted in at the bottom
      model = {model[8:0], model[9] ^ model[6]};
      if (n <= 20) check(value == model, "model");
      check(value != 0, "non-zero");
      if (n < 1023) begin
        check(!seen[value] && value != first, "distinct");
        seen[value] = 1'b1;
      end else begin
        check(value == first, "period 1023");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
