// tb_nsp_top: end-to-end run of the neural synchrony processor at its
// default parameters (8 MHz clock, 16 slots at 4 kS/s, 16/64/32-tap FIR).
//
// A behavioural SAR ADC answers every conversion with the signal of the
// selected LNA: 100 Hz tones with LNA-specific phases (LNA 14 at 120 Hz),
// and on LNA 12 a 100 Hz tone whose amplitude follows the phase of LNA 0.
// The testbench programs the FIR (windowed-sinc decimator, 60-140 Hz
// bandpass, 31-tap Hamming Hilbert; set 1 is an all-pass used by slot 15,
// which re-reads LNA 0), features, thresholds and stimulator, then walks the
// stimulation modes:
//   A  F_SMP-locked, TH_SMP = 0, max 60 Hz: stimuli start only just after
//      the selected phase crosses 0 upwards; 100 Hz crossings exceed the
//      60 Hz limit, so some triggers are dropped; phase wraps never fire
//   B  F_WIN-locked on PLV(0,1) inside (800, 1023)
//   C  F_SMP&F_WIN-locked on the unlocked pair PLV(0,14): nothing fires;
//      then on PLV(0,1): fires
//   D  randomized phase (PRBS threshold)
//   E  amplitude-locked: F_SMP = envelope of slot 13, TH_SMP = 200; LNA 13
//      steps from 100 to 300 LSB, nothing fires before the step, at least
//      one stimulus after it
//   F  SE-locked: F_WIN = SE of slot 13, first with the window below the
//      measured SE (blocked), then around it (fires)
// Checked: relative phase of LNA 1 vs LNA 0 (0.4 rad), PLV(0,1) near
// max(|cos 0.4|,|sin 0.4|), pulse widths, charge-balancing windows, no FIR
// overrun. Each mechanism is counted and must occur at least once.
module tb_nsp_top;
  import nsp_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real FCLK = 8.0e6;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [11:0] cfg_addr = 0;
  logic [15:0] cfg_wdata = 0;
  logic [3:0] mux_sel;
  logic adc_start, adc_valid = 0;
  logic [9:0] adc_data = 0;
  logic [3:0] stim_pos, stim_neg, stim_cb, stim_pas;
  logic en_cp;
  logic signed [9:0] phase [NCH];
  logic [9:0] amp [NCH], feat [NFEAT], se [NCH];
  logic frame, win_valid, en_stim, fir_overrun;

  nsp_top dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  // ---------------------------------------------------------------------
  // Behavioural ADC: 10b offset binary, result 20 clocks after start
  // ---------------------------------------------------------------------
  real step_t = 1.0e9;             // time of the LNA 13 amplitude step

  function automatic real lna(int l, real t);
    real th0;
    th0 = 2.0 * PI * 100.0 * t;
    if (l == 13) return ((t >= step_t) ? 300.0 : 100.0) * $sin(th0);
    if (l == 14) return 250.0 * $sin(2.0 * PI * 120.0 * t);
    if (l == 12) return (150.0 + 100.0 * $cos(th0)) * $sin(2.0 * PI * 100.0 * t + 1.3);
    return 300.0 * $sin(th0 + 0.4 * real'(l));
  endfunction

  always @(posedge clk) begin
    if (adc_start) begin
      fork
        automatic int l = int'(mux_sel);
        automatic real t = real'(cyc) / FCLK;
        begin
          int code;
          repeat (20) @(posedge clk);
          code = int'($floor(lna(l, t) + 0.5)) + 512;
          adc_data  <= 10'(code);
          adc_valid <= 1'b1;
          @(posedge clk);
          adc_valid <= 1'b0;
        end
      join_none
    end
  end

  // ---------------------------------------------------------------------
  // Configuration
  // ---------------------------------------------------------------------
  task automatic wr(logic [11:0] a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = 16'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic real hamming(int n, int len);
    return 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(len - 1));
  endfunction

  function automatic real sinc(real x);
    return (x == 0.0) ? 1.0 : $sin(PI * x) / (PI * x);
  endfunction

  // coefficient word i lives at 0x800 + i
  task automatic wrc(int i, int d);
    wr(12'(12'h800 + i), d);
  endtask

  task automatic program_fir();
    real h [64];
    real sum;
    // decimator: 16-tap low-pass, cutoff 0.1 fs_in, DC gain 0.95
    sum = 0;
    for (int n = 0; n < 16; n++) begin h[n] = hamming(n, 16) * sinc(0.2 * (real'(n) - 7.5)); sum += h[n]; end
    for (int n = 0; n < 16; n++) wrc(n, int'($floor(h[n] / sum * 0.95 * 32768.0 + 0.5)));
    // set 0 bandpass 60-140 Hz at 1 kS/s, 64 taps
    for (int n = 0; n < 64; n++) begin
      real m = real'(n) - 31.5;
      h[n] = hamming(n, 64) * (0.28 * sinc(0.28 * m) - 0.12 * sinc(0.12 * m));
      wrc(16 + n, int'($floor(h[n] * 32768.0 + 0.5)));
    end
    // Hilbert, 31 taps centred on tap 15, tap 31 zero (both sets)
    for (int n = 0; n < 32; n++) begin
      int m = n - 15;
      real v = (n < 31 && (m % 2 != 0)) ? 2.0 / (PI * real'(m)) * hamming(n, 31) : 0.0;
      wrc(80 + n, int'($floor(v * 32768.0 + 0.5)));
      wrc(176 + n, int'($floor(v * 32768.0 + 0.5)));
    end
    // set 1 bandpass: all-pass (single tap 0.99)
    wrc(112, 32440);
    for (int n = 1; n < 64; n++) wrc(112 + n, 0);
  endtask

  function automatic int selw(stim_mode_e m, bit prbs, int fs, int fw);
    return (int'(m) << 11) | (int'(prbs) << 10) | (fs << 5) | fw;
  endfunction

  // ---------------------------------------------------------------------
  // Monitors and mechanism counters
  // ---------------------------------------------------------------------
  int n_start = 0, n_en = 0, n_drop = 0, n_wrap_quiet = 0, n_win = 0, n_cb = 0, n_pas = 0;
  int n_prbs = 0, n_smp_lock = 0, n_win_lock = 0, n_both_lock = 0, n_rand_lock = 0, n_set1 = 0;
  int n_both_blocked = 0, n_amp_lock = 0, n_se_lock = 0, n_se_blocked = 0;
  bit cur_amp = 0, cur_se = 0;
  int phase_sel = 0;               // channel whose phase selects F_SMP
  stim_mode_e cur_mode = MODE_OFF;
  bit cur_prbs = 0;
  logic signed [9:0] ph_prev = 0;
  longint pos_start = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (win_valid) n_win++;
      if (dut.prbs_step) n_prbs++;
      if (en_stim) begin
        n_en++;
        if (!dut.u_pg.ready || dut.u_pg.busy) n_drop++;
      end
      if (dut.u_pg.started) begin
        n_start++;
        case (cur_mode)
          MODE_SMP:     if (cur_amp) n_amp_lock++; else if (cur_prbs) n_rand_lock++; else n_smp_lock++;
          MODE_WIN:     if (cur_se) n_se_lock++; else n_win_lock++;
          MODE_SMP_WIN: n_both_lock++;
          default:      check(0, "stimulus with mode off");
        endcase
        if (cur_mode == MODE_SMP && cur_amp)
          check(amp[13] > 200, $sformatf("amplitude-locked stimulus at envelope %0d", amp[13]));
        if (cur_mode == MODE_SMP && !cur_prbs && !cur_amp)
          check(phase[phase_sel] >= 0 && phase[phase_sel] < 120,
                $sformatf("stimulus at phase %0d, threshold 0", phase[phase_sel]));
      end
      if (frame) begin
        // a wrap from +pi to -pi on the selected phase must not fire
        if (ph_prev > 400 && phase[phase_sel] < -400 && cur_mode == MODE_SMP && !cur_prbs) begin
          n_wrap_quiet++;
        end
        ph_prev <= phase[phase_sel];
      end
      if (stim_pos != 0 && pos_start < 0) pos_start = cyc;
      if (stim_pos == 0 && pos_start >= 0) begin
        check(cyc - pos_start == 10 * 80, $sformatf("POS width %0d clocks", cyc - pos_start));
        check(stim_pos == 0 && stim_neg == 4'b0011, "NEG follows POS on channels 0,1");
        pos_start = -1;
      end
      if (stim_cb == 4'b0011 && !dut.u_pg.started) n_cb++;
      if (stim_pas == 4'b0011) n_pas++;
      if (dut.an_valid && dut.an_slot == 4'd15) n_set1++;
    end
  end

  // wrap check: en_stim must not follow a wrap tick
  always @(posedge clk) begin
    if (rst_n && dut.u_ctrl.tick && cur_mode == MODE_SMP && !cur_prbs && !cur_amp &&
        ph_prev > 400 && phase[phase_sel] < -400 && dut.u_ctrl.smp_hit)
      check(0, "phase wrap triggered");
  end

  task automatic run_ms(int ms);
    repeat (ms * 8000) @(posedge clk);
  endtask

  initial begin
    int s0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    program_fir();
    wr(12'h10F, 0);                     // slot 15 re-reads LNA 0 ...
    wr(12'h11F, 1);                     // ... through coefficient set 1
    wr(12'h120, (0 << 8) | (0 << 4) | 1);   // f0 PLV(0,1)
    wr(12'h121, (0 << 8) | (0 << 4) | 14);  // f1 PLV(0,14)
    wr(12'h122, (1 << 8) | (0 << 4) | 12);  // f2 PAC(phase 0, envelope 12)
    wr(12'h130, 4);                     // 16-frame windows
    wr(12'h140, 0);                     // TH_SMP
    wr(12'h141, 1023);                  // TH_WIN,H
    wr(12'h142, 800);                   // TH_WIN,L
    wr(12'h151, (3 << 6) | 10);         // channels 0,1; PW = 10 ticks = 100 us
    wr(12'h152, 60);                    // max 60 Hz
    wr(12'h160, 1);                     // run
    run_ms(150);                        // filters settle, several windows

    // relative phase and PLV of the locked pair
    begin
      real d;
      d = real'(10'(phase[1] - phase[0])) / 512.0 * PI;
      if (d > PI) d -= 2.0 * PI;
      check(d > 0.33 && d < 0.47, $sformatf("phase(1)-phase(0) = %f rad, expected 0.40", d));
      check(feat[0] > 900 && feat[0] < 990, $sformatf("PLV(0,1) = %0d, expected ~943", feat[0]));
      check(feat[1] < 800, $sformatf("PLV(0,14) = %0d, expected low", feat[1]));
      check(feat[2] > 20, $sformatf("PAC(0,12) = %0d, expected > 0", feat[2]));
      check(se[0] > 10, "spectral energy of LNA 0");
      check(amp[15] > 200, "slot 15 (set 1) envelope");
      $display("PLV(0,1)=%0d PLV(0,14)=%0d PAC=%0d SE0=%0d amp0=%0d amp15=%0d",
               feat[0], feat[1], feat[2], se[0], amp[0], amp[15]);
    end

    // A: F_SMP-locked on the phase of slot 0
    phase_sel = 0; cur_mode = MODE_SMP; cur_prbs = 0;
    wr(12'h150, selw(MODE_SMP, 0, 0, 0));
    s0 = n_start;
    run_ms(60);
    // crossings every 10 ms, at most one stimulus per 16.7 ms: every second one
    check(n_start - s0 >= 2 && n_start - s0 <= 4, $sformatf("A: %0d stimuli in 60 ms", n_start - s0));

    // B: F_WIN-locked on PLV(0,1)
    cur_mode = MODE_WIN;
    wr(12'h150, selw(MODE_WIN, 0, 0, 0));
    run_ms(40);

    // C: F_SMP & F_WIN on the unlocked pair, then on the locked pair
    cur_mode = MODE_SMP_WIN;
    wr(12'h150, selw(MODE_SMP_WIN, 0, 0, 1));
    s0 = n_start;
    run_ms(40);
    n_both_blocked = (n_start == s0) ? 1 : 0;
    check(n_start == s0, "C: no stimulus while PLV(0,14) is outside the window");
    wr(12'h150, selw(MODE_SMP_WIN, 0, 0, 0));
    run_ms(40);

    // D: randomized phase threshold
    cur_mode = MODE_SMP; cur_prbs = 1;
    wr(12'h150, selw(MODE_SMP, 1, 0, 0));
    run_ms(60);

    // E: amplitude-locked on the envelope of slot 13
    cur_prbs = 0; cur_amp = 1;
    wr(12'h140, 200);
    wr(12'h150, selw(MODE_SMP, 0, NCH + 13, 0));
    s0 = n_start;
    run_ms(20);
    check(n_start == s0, "E: no stimulus while the envelope of slot 13 is below TH_SMP");
    check(amp[13] < 150, $sformatf("E: envelope of slot 13 before the step = %0d", amp[13]));
    step_t = real'(cyc) / FCLK;
    run_ms(120);
    check(n_start > s0, "E: stimulus after the envelope rises above TH_SMP");
    check(amp[13] > 180, $sformatf("E: envelope of slot 13 after the step = %0d", amp[13]));

    // F: SE-locked window on slot 13, blocked, then open
    begin
      int se13;
      cur_mode = MODE_WIN; cur_amp = 0; cur_se = 1;
      se13 = int'(se[13]);
      check(se13 >= 4, $sformatf("F: SE of slot 13 = %0d", se13));
      wr(12'h141, se13 / 2);            // window (0, SE/2): SE is above it
      wr(12'h142, 0);
      wr(12'h150, selw(MODE_WIN, 0, 0, NFEAT + 13));
      s0 = n_start;
      run_ms(20);
      n_se_blocked = (n_start == s0) ? 1 : 0;
      check(n_start == s0, "F: no stimulus while SE is above TH_WIN,H");
      wr(12'h141, 1023);                // window (SE/2, 1023): SE is inside
      wr(12'h142, se13 / 2);
      run_ms(20);
    end

    cur_mode = MODE_OFF; cur_prbs = 0; cur_se = 0;
    wr(12'h150, selw(MODE_OFF, 0, 0, 0));
    run_ms(5);

    $display("starts=%0d en=%0d dropped=%0d wraps=%0d windows=%0d cb=%0d pas=%0d prbs=%0d",
             n_start, n_en, n_drop, n_wrap_quiet, n_win, n_cb, n_pas, n_prbs);
    $display("locked: smp=%0d win=%0d both=%0d random=%0d amp=%0d se=%0d set1=%0d",
             n_smp_lock, n_win_lock, n_both_lock, n_rand_lock, n_amp_lock, n_se_lock, n_set1);
    check(n_smp_lock > 0, "mechanism: F_SMP-locked stimulus");
    check(n_win_lock > 0, "mechanism: F_WIN-locked stimulus");
    check(n_both_lock > 0, "mechanism: F_SMP&F_WIN-locked stimulus");
    check(n_both_blocked > 0, "mechanism: window blocks stimulus");
    check(n_rand_lock > 0 && n_prbs > 0, "mechanism: randomized phase locking");
    check(n_amp_lock > 0, "mechanism: amplitude-locked stimulus");
    check(n_se_lock > 0 && n_se_blocked > 0, "mechanism: SE window blocks and passes");
    check(n_drop > 0, "mechanism: rate limit drops a trigger");
    check(n_wrap_quiet > 0, "mechanism: phase wrap without stimulus");
    check(n_win > 0, "mechanism: window update");
    check(n_cb > 0 && n_pas > 0, "mechanism: active and passive charge balancing windows");
    check(n_set1 > 0, "mechanism: second coefficient set / reordered slot");
    check(!fir_overrun, "no FIR overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
