// tb_fir_coef_mem: fills the memory with random words and reads them back
// through the asynchronous port in random order; checks the reset value.
module tb_fir_coef_mem;
  localparam int DEPTH = 208, W = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic signed [W-1:0] wdata = 0, rdata;
  logic signed [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  fir_coef_mem #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    raddr = 8'd17;
    #1;
    checks++; if (rdata != 0) begin failures++; $display("reset value"); end
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = W'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    repeat (400) begin
      raddr = 8'($urandom_range(0, DEPTH - 1));
      #1;
      checks++;
      if (rdata != model[raddr]) begin failures++; $display("addr %0d: %h vs %h", raddr, rdata, model[raddr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
