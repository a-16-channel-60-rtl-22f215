// tb_threshold_mem: reset value, writes to each word, parallel readout and
// an ignored write to an address beyond the last word.
module tb_threshold_mem;
  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] waddr = 0;
  logic [9:0] wdata = 0;
  logic [9:0] th [3];
  logic [9:0] exp_th [3];
  int checks = 0, failures = 0;

  threshold_mem #(.NTH(3), .W(10)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (th[i] != exp_th[i]) begin failures++; $display("word %0d = %0d, expected %0d", i, th[i], exp_th[i]); end
    end
  endtask

  initial begin
    exp_th = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    repeat (50) begin
      @(negedge clk);
      we = 1; waddr = 2'($urandom_range(0, 3)); wdata = 10'($urandom);
      @(negedge clk);
      we = 0;
      if (waddr < 3) exp_th[waddr] = wdata;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
