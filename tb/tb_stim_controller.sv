// tb_stim_controller: directed sequences for each stimulation mode.
//   F_SMP-locked: a phase ramp crosses TH_SMP upwards (must fire once) and
//     wraps from +pi to -pi (must not fire); envelopes compare unsigned.
//   F_WIN-locked: fires on every tick while TH_WIN,L < F_WIN < TH_WIN,H,
//     both for a PLV/PAC feature and for a spectral energy.
//   F_SMP&F_WIN-locked: fires on a crossing only inside the window.
//   PRBS threshold: the crossing is taken against the PRBS value and a new
//     value is requested after each stimulus. Mode off never fires.
// Expected pulses are worked out from the stimulus in the testbench.
module tb_stim_controller;
  import nsp_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  ctrl_sel_t sel;
  logic signed [9:0] phase [NCH];
  logic [9:0] amp [NCH], feat [NFEAT], se [NCH];
  logic [9:0] th_smp = 0, th_win_h = 0, th_win_l = 0, prbs = 0;
  logic en_stim, prbs_step, smp_hit, win_ok;
  int checks = 0, failures = 0;
  int n_steps = 0;

  stim_controller #(.NCH(NCH), .NFEAT(NFEAT), .W(10)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && prbs_step) n_steps++;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // one sample tick; returns whether en_stim pulsed in the following clock
  task automatic do_tick(output bit fired);
    @(negedge clk); tick = 1;
    @(negedge clk); tick = 0;
    fired = en_stim;
    @(negedge clk);
    check(!en_stim, "en_stim lasts one clock");
  endtask

  task automatic expect_tick(bit exp, string msg);
    bit f;
    do_tick(f);
    check(f == exp, msg);
  endtask

  initial begin
    int ph [8] = '{-100, -50, 10, 100, 500, -510, -200, 20};
    bit ex [8] = '{0, 0, 1, 0, 0, 0, 0, 1};
    for (int i = 0; i < NCH; i++) begin phase[i] = 0; amp[i] = 0; se[i] = 0; end
    for (int i = 0; i < NFEAT; i++) feat[i] = 0;
    sel = '{mode: MODE_SMP, th_prbs: 1'b0, fsmp: 5'd3, fwin: 5'd1};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // F_SMP-locked on the phase of channel 3, threshold 0
    phase[3] = -200;
    expect_tick(0, "first tick");
    foreach (ph[i]) begin
      phase[3] = 10'(ph[i]);
      expect_tick(ex[i], $sformatf("phase step %0d (%0d)", i, ph[i]));
    end
    // envelope of channel 2, unsigned compare against 300
    sel.fsmp = 5'(NCH + 2); th_smp = 10'd300;
    amp[2] = 10'd100; expect_tick(0, "amp below");
    amp[2] = 10'd600; expect_tick(1, "amp 600 > 300 unsigned");
    amp[2] = 10'd700; expect_tick(0, "amp stays above");
    // F_WIN-locked on feature 1, window (400, 800)
    sel.mode = MODE_WIN; th_win_h = 10'd800; th_win_l = 10'd400;
    feat[1] = 10'd500; expect_tick(1, "plv in band"); expect_tick(1, "plv in band again");
    feat[1] = 10'd900; expect_tick(0, "plv above band");
    feat[1] = 10'd300; expect_tick(0, "plv below band");
    feat[1] = 10'd800; expect_tick(0, "plv at upper bound");
    sel.fwin = 5'(NFEAT + 5); se[5] = 10'd401; expect_tick(1, "se in band");
    se[5] = 10'd400; expect_tick(0, "se at lower bound");
    // F_SMP & F_WIN-locked
    sel.mode = MODE_SMP_WIN; sel.fsmp = 5'd7; th_smp = 10'd0;
    phase[7] = -10; expect_tick(0, "below");
    phase[7] = 10;  expect_tick(0, "crossing outside window");
    se[5] = 10'd600;
    phase[7] = -10; expect_tick(0, "below");
    phase[7] = 10;  expect_tick(1, "crossing inside window");
    // PRBS threshold, F_SMP-locked
    sel.mode = MODE_SMP; sel.th_prbs = 1'b1; prbs = 10'(200);
    phase[7] = 100; expect_tick(0, "below prbs");
    phase[7] = 250; expect_tick(1, "above prbs");
    check(n_steps == 1, "prbs step after stimulus");
    // mode off
    sel.mode = MODE_OFF; sel.th_prbs = 1'b0;
    phase[7] = -10; expect_tick(0, "off");
    phase[7] = 10;  expect_tick(0, "off, crossing");
    check(n_steps == 1, "no further prbs step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
