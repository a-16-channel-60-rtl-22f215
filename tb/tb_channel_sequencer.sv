// tb_channel_sequencer: programs a permuted slot order (with one LNA in two
// slots), answers each conversion with an ADC model whose code encodes the
// selected LNA and a running count, and checks for every slot: mux_sel
// follows the order table, adc_start comes exactly every SLOT_CYCLES clocks,
// and the tagged sample carries the slot number and the two's complement
// conversion of the ADC code.
module tb_channel_sequencer;
  localparam int NCH = 16, SC = 12, ADC_W = 10;
  logic clk = 0, rst_n = 0, run = 0;
  logic ord_we = 0;
  logic [3:0] ord_addr = 0, ord_wdata = 0;
  logic [3:0] mux_sel;
  logic adc_start, adc_valid = 0;
  logic [ADC_W-1:0] adc_data = 0;
  logic smp_valid;
  logic [3:0] smp_slot;
  logic signed [ADC_W-1:0] smp_data;
  int checks = 0, failures = 0;
  int order [NCH];

  channel_sequencer #(.NCH(NCH), .ADC_W(ADC_W), .SLOT_CYCLES(SC)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // ADC model: answers 4 clocks after start with {lna, count}
  int cnt = 0;
  logic [ADC_W-1:0] pending_code [$];
  int start_t = -1, t = 0, exp_slot = 0;
  always @(posedge clk) begin
    t <= t + 1;
    adc_valid <= 1'b0;
    if (rst_n && adc_start) begin
      if (start_t >= 0) check(t - start_t == SC, "slot period");
      start_t <= t;
      check(int'(mux_sel) == order[exp_slot], $sformatf("mux_sel %0d for slot %0d", mux_sel, exp_slot));
      cnt <= cnt + 1;
      fork
        automatic logic [ADC_W-1:0] code = ADC_W'({mux_sel, 6'(cnt)});
        begin
          repeat (4) @(posedge clk);
          adc_valid <= 1'b1;
          adc_data  <= code;
          pending_code.push_back(code);
        end
      join_none
    end
    if (rst_n && smp_valid) begin
      logic [ADC_W-1:0] c;
      c = pending_code.pop_front();
      check(int'(smp_slot) == exp_slot, $sformatf("slot tag %0d vs %0d", smp_slot, exp_slot));
      check(smp_data == $signed({~c[ADC_W-1], c[ADC_W-2:0]}), "offset binary to two's complement");
      exp_slot = (exp_slot + 1) % NCH;
    end
  end

  initial begin
    for (int i = 0; i < NCH; i++) order[i] = (i * 7 + 3) % NCH;
    order[5] = order[2];         // one LNA read in two slots
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NCH; i++) begin
      @(negedge clk);
      ord_we = 1; ord_addr = 4'(i); ord_wdata = 4'(order[i]);
    end
    @(negedge clk);
    ord_we = 0;
    run = 1;
    repeat (3 * NCH * SC + 5) @(posedge clk);
    check(checks > 3 * NCH * 3, "enough samples seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
