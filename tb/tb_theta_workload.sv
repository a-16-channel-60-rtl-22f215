// tb_theta_workload: theta-band (4-8 Hz) phase-locked stimulation at 180
// degrees with a 6 Hz stimulation limit, and PLV-gated phase locking.
//
// Theta phase at 1 kS/s needs far longer filters than the default build
// carries, so this testbench elaborates nsp_top with a 256-tap bandpass and
// a 511-tap Hilbert filter (512 stored taps, group delay 255). One FIR job
// then takes 16 + 256 + 512 = 784 clocks, so the slot is widened to 800
// clocks, which keeps 64 kS/s at a 51.2 MHz clock; the 10 us stimulator
// tick becomes 512 clocks. Everything else is at its default.
//
// A behavioural ADC answers every conversion with the LNA signal:
//   LNA 0, 1, 4..15 : 7 Hz theta, 300 LSB, phase 0.4 rad * LNA, plus a
//                     60 Hz, 100 LSB interferer
//   LNA 2           : 4 Hz theta, 300 LSB (not locked to LNA 0)
//   LNA 3           : 40 Hz only (outside the theta band)
// The bandpass (3-10 Hz windowed sinc) and the Hilbert taps are scaled by
// the testbench to unit gain at 7 Hz.
// Run:
//   1. settle; check relative phase, PLV(0,1) high, PLV(0,2) low, and the
//      rejection of the 40 Hz channel
//   2. F_SMP-locked on the phase of LNA 0 with TH_SMP = 500/512 (just below
//      180 deg), maximum 6 Hz: every stimulus must come when the true phase
//      of LNA 0, taken back by the filters' group delay, is near 180 deg;
//      successive stimuli are at least 1/6 s apart, so some 7 Hz crossings
//      are dropped; wraps from +180 to -180 deg never fire
//   3. F_SMP&F_WIN-locked with PLV(0,2) as F_WIN: blocked
//   4. F_SMP&F_WIN-locked with PLV(0,1) as F_WIN: fires at 180 deg
// Every mechanism is counted and must occur at least once.
module tb_theta_workload;
  import nsp_pkg::*;
  localparam real PI    = 3.14159265358979323846;
  localparam int  SLOT  = 800;
  localparam int  TDIV  = 512;
  localparam real FCLK  = 64000.0 * real'(SLOT);
  localparam int  NBPF  = 256;
  localparam int  NHT   = 512;
  localparam real FTH   = 7.0;
  // decimator (7.5 input samples at 4 kS/s) + bandpass (127.5 ms) + Hilbert
  // (255 ms) group delays
  localparam real DELAY = 7.5 / 4000.0 + 0.1275 + 0.255;
  localparam int  CLK_PER_MS = int'(FCLK / 1000.0);

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

  nsp_top #(.SLOT_CYCLES(SLOT), .TICK_DIV(TDIV), .N_BPF(NBPF), .N_HT(NHT),
            .HT_DELAY(NHT / 2 - 1)) dut (.*);
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (160_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0.4f s", msg, real'(cyc) / FCLK); end
  endtask

  function automatic real wrap(real a);
    while (a >  PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    return a;
  endfunction

  // ---------------------------------------------------------------------
  // Behavioural ADC: 10b offset binary, result 20 clocks after start
  // ---------------------------------------------------------------------
  function automatic real lna(int l, real t);
    if (l == 2) return 300.0 * $sin(2.0 * PI * 4.0 * t);
    if (l == 3) return 300.0 * $sin(2.0 * PI * 40.0 * t);
    return 300.0 * $sin(2.0 * PI * FTH * t + 0.4 * real'(l)) +
           100.0 * $sin(2.0 * PI * 60.0 * t);
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

  task automatic wrc(int i, real v);
    wr(12'(12'h800 + i), int'($floor(v * 32768.0 + 0.5)));
  endtask

  function automatic real hamming(int n, int len);
    return 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(len - 1));
  endfunction

  function automatic real sinc(real x);
    return (x == 0.0) ? 1.0 : $sin(PI * x) / (PI * x);
  endfunction

  task automatic program_fir();
    real h [NHT];
    real sum, gr, gi, g, w;
    // decimator: 16-tap low-pass, cutoff 0.1 fs_in, DC gain 0.95
    sum = 0;
    for (int n = 0; n < 16; n++) begin h[n] = hamming(n, 16) * sinc(0.2 * (real'(n) - 7.5)); sum += h[n]; end
    for (int n = 0; n < 16; n++) wrc(n, h[n] / sum * 0.95);
    // bandpass 3-10 Hz at 1 kS/s, unit gain at 7 Hz
    w = 2.0 * PI * FTH / 1000.0;
    gr = 0; gi = 0;
    for (int n = 0; n < NBPF; n++) begin
      real m = real'(n) - real'(NBPF - 1) / 2.0;
      h[n] = hamming(n, NBPF) * (0.020 * sinc(0.020 * m) - 0.006 * sinc(0.006 * m));
      gr += h[n] * $cos(w * real'(n)); gi -= h[n] * $sin(w * real'(n));
    end
    g = $sqrt(gr * gr + gi * gi);
    for (int n = 0; n < NBPF; n++) wrc(16 + n, h[n] / g);
    // Hilbert: NHT-1 taps centred on tap NHT/2-1, last tap zero, unit gain at 7 Hz
    gr = 0; gi = 0;
    for (int n = 0; n < NHT; n++) begin
      int m = n - (NHT / 2 - 1);
      h[n] = (n < NHT - 1 && (m % 2 != 0)) ? 2.0 / (PI * real'(m)) * hamming(n, NHT - 1) : 0.0;
      gr += h[n] * $cos(w * real'(n)); gi -= h[n] * $sin(w * real'(n));
    end
    g = $sqrt(gr * gr + gi * gi);
    for (int n = 0; n < NHT; n++) wrc(16 + NBPF + n, h[n] / g);
    $display("filters programmed: bandpass %0d taps, Hilbert %0d taps", NBPF, NHT - 1);
  endtask

  function automatic int selw(stim_mode_e m, int fs, int fw);
    return (int'(m) << 11) | (fs << 5) | fw;
  endfunction

  // ---------------------------------------------------------------------
  // Monitors and mechanism counters
  // ---------------------------------------------------------------------
  int n_start = 0, n_drop = 0, n_wrap = 0, n_smp = 0, n_both = 0, n_blocked = 0;
  stim_mode_e cur_mode = MODE_OFF;
  longint last_start = -1;
  real worst = 0.0;
  logic signed [9:0] ph_prev = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (en_stim && (!dut.u_pg.ready || dut.u_pg.busy)) n_drop++;
      if (frame) begin
        if (ph_prev > 400 && phase[0] < -400) n_wrap++;
        ph_prev <= phase[0];
      end
      if (dut.u_ctrl.tick && ph_prev > 400 && phase[0] < -400 && dut.u_ctrl.smp_hit)
        check(0, "phase wrap triggered");
      if (dut.u_pg.started) begin
        real t, err;
        t   = real'(cyc) / FCLK;
        // analytic phase of A sin(x) is x - pi/2; target +-pi
        err = wrap(2.0 * PI * FTH * (t - DELAY) - PI / 2.0 - PI);
        if ((err < 0 ? -err : err) > worst) worst = (err < 0 ? -err : err);
        n_start++;
        case (cur_mode)
          MODE_SMP:     n_smp++;
          MODE_SMP_WIN: n_both++;
          default:      check(0, "stimulus in an unexpected mode");
        endcase
        check(err > -0.3 && err < 0.3,
              $sformatf("stimulus %0.3f rad from 180 deg of the true theta phase", err));
        check(phase[0] >= 495 || phase[0] < -500,
              $sformatf("stimulus at extracted phase %0d", phase[0]));
        if (last_start >= 0)
          check(cyc - last_start >= longint'(16667) * TDIV,
                $sformatf("stimulus interval %0.1f ms exceeds 6 Hz",
                          real'(cyc - last_start) / FCLK * 1000.0));
        last_start = cyc;
      end
    end
  end

  task automatic run_ms(int ms);
    repeat (ms) repeat (CLK_PER_MS) @(posedge clk);
  endtask

  initial begin
    int s0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    program_fir();
    wr(12'h120, (0 << 8) | (0 << 4) | 1);   // f0 PLV(0,1)
    wr(12'h121, (0 << 8) | (0 << 4) | 2);   // f1 PLV(0,2)
    wr(12'h130, 8);                     // 256-frame windows
    wr(12'h140, 500);                   // TH_SMP: 500/512 * 180 deg
    wr(12'h141, 1023);                  // TH_WIN,H
    wr(12'h142, 600);                   // TH_WIN,L
    wr(12'h151, (1 << 6) | 10);         // channel 0, PW 100 us
    wr(12'h152, 6);                     // max 6 Hz
    wr(12'h160, 1);
    run_ms(950);                        // filters fill (~0.77 s), one window

    begin
      real d;
      d = real'(10'(phase[1] - phase[0])) / 512.0 * PI;
      if (d > PI) d -= 2.0 * PI;
      check(d > 0.3 && d < 0.5, $sformatf("theta phase(1)-phase(0) = %f rad, expected 0.40", d));
      check(feat[0] > 900, $sformatf("PLV(0,1) = %0d, expected high", feat[0]));
      check(feat[1] < 600, $sformatf("PLV(0,2) = %0d, expected low", feat[1]));
      check(amp[0] > 200 && amp[0] < 400, $sformatf("theta envelope %0d, expected ~300", amp[0]));
      check(amp[3] < 30, $sformatf("40 Hz channel envelope %0d, expected rejected", amp[3]));
      $display("dphase=%f PLV(0,1)=%0d PLV(0,2)=%0d amp0=%0d amp3=%0d",
               d, feat[0], feat[1], amp[0], amp[3]);
    end

    // 2: phase-locked at 180 deg
    cur_mode = MODE_SMP;
    wr(12'h150, selw(MODE_SMP, 0, 0));
    s0 = n_start;
    run_ms(1000);
    // 7 crossings, at most one stimulus per 166.7 ms: every second one fires
    check(n_start - s0 >= 3 && n_start - s0 <= 5, $sformatf("%0d phase-locked stimuli in 1 s", n_start - s0));

    // 3: PLV-gated on the unlocked pair: blocked
    cur_mode = MODE_SMP_WIN;
    wr(12'h150, selw(MODE_SMP_WIN, 0, 1));
    s0 = n_start;
    run_ms(300);
    n_blocked = (n_start == s0) ? 1 : 0;
    check(n_start == s0, "no stimulus while PLV(0,2) is below TH_WIN,L");

    // 4: PLV-gated on the locked pair
    wr(12'h150, selw(MODE_SMP_WIN, 0, 0));
    run_ms(450);

    $display("stimuli=%0d (phase-locked %0d, PLV-gated %0d) dropped=%0d wraps=%0d worst=%0.3f rad",
             n_start, n_smp, n_both, n_drop, n_wrap, worst);
    check(n_smp > 0, "mechanism: theta phase-locked stimulus");
    check(n_both > 0, "mechanism: PLV-gated phase-locked stimulus");
    check(n_blocked > 0, "mechanism: PLV window blocks stimulus");
    check(n_drop > 0, "mechanism: 6 Hz limit drops a crossing");
    check(n_wrap > 0, "mechanism: phase wrap without stimulus");
    check(!fir_overrun, "no FIR overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
