// tb_pulse_gen: checks the biphasic event timing and the rate limit.
// With tick = every clock and TICKS_PER_SEC = 1000:
//   * POS and NEG each last pw ticks, CB CB_TICKS, PAS PAS_TICKS, only on
//     the channels of stim_on; EN_CP covers POS and NEG exactly,
//   * a continuously held trigger produces events exactly
//     ceil(1000 / freq) ticks apart (or the event length if longer),
//   * freq = 0 or stim_on = 0 produces no event.
module tb_pulse_gen;
  localparam int TPS = 1000, CBT = 5, PAST = 7;
  logic clk = 0, rst_n = 0, tick = 1, trig = 0;
  logic [3:0] stim_on = 0;
  logic [5:0] pw = 0;
  logic [7:0] freq = 0;
  logic [3:0] pos, neg, cb, pas;
  logic en_cp, busy, started;
  int checks = 0, failures = 0;

  pulse_gen #(.NSTIM(4), .PW_W(6), .FREQ_W(8), .TICKS_PER_SEC(TPS),
              .CB_TICKS(CBT), .PAS_TICKS(PAST)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    #3000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // count the length of each phase of one event
  task automatic one_event(logic [3:0] ch, int width);
    int n_pos = 0, n_neg = 0, n_cb = 0, n_pas = 0, n_cp = 0;
    @(negedge clk);
    stim_on = ch; pw = 6'(width);
    trig = 1;
    @(negedge clk);
    trig = 0;
    while (!busy) @(negedge clk);
    while (busy) begin
      if (pos != 0) begin n_pos++; check(pos == ch && neg == 0 && cb == 0 && pas == 0, "pos exclusive"); end
      if (neg != 0) begin n_neg++; check(neg == ch && pos == 0, "neg exclusive"); end
      if (cb  != 0) begin n_cb++;  check(cb == ch, "cb channels"); end
      if (pas != 0) begin n_pas++; check(pas == ch, "pas channels"); end
      if (en_cp) n_cp++;
      @(negedge clk);
    end
    check(n_pos == width, $sformatf("POS %0d ticks, pw %0d", n_pos, width));
    check(n_neg == width, $sformatf("NEG %0d ticks", n_neg));
    check(n_cb == CBT, $sformatf("CB %0d ticks", n_cb));
    check(n_pas == PAST, $sformatf("PAS %0d ticks", n_pas));
    check(n_cp == 2 * width, "EN_CP spans POS and NEG");
  endtask

  initial begin
    int last, gap;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // freq = 0 blocks stimulation
    stim_on = 4'b0101; pw = 6'd3; trig = 1;
    repeat (50) @(negedge clk);
    check(!busy, "freq=0 blocks");
    trig = 0;
    freq = 8'd200;
    repeat (10) @(negedge clk);
    one_event(4'b0101, 3);
    repeat (10) @(negedge clk);
    one_event(4'b1000, 10);
    repeat (10) @(negedge clk);
    one_event(4'b1111, 1);
    // stim_on = 0: nothing happens
    repeat (10) @(negedge clk);
    stim_on = 0; trig = 1;
    repeat (20) @(negedge clk);
    check(!busy, "stim_on=0 blocks");
    // rate limit: hold the trigger and measure the spacing of starts
    for (int k = 0; k < 3; k++) begin
      int f_hz, expect_gap;
      f_hz = (k == 0) ? 10 : (k == 1) ? 7 : 100;
      freq = 8'(f_hz); stim_on = 4'b0011; pw = 6'd2; trig = 1;
      expect_gap = (TPS + f_hz - 1) / f_hz;
      if (expect_gap < 2 * 2 + CBT + PAST + 1) expect_gap = 2 * 2 + CBT + PAST + 1;
      last = -1;
      for (int t = 0; t < 4 * expect_gap + 400; t++) begin
        @(negedge clk);
        if (started) begin
          if (last >= 0) begin
            gap = t - last;
            check(gap == expect_gap, $sformatf("freq %0d gap %0d expected %0d", f_hz, gap, expect_gap));
          end
          last = t;
        end
      end
      trig = 0;
      repeat (TPS + 50) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
