// tb_sync_extractor: drives analytic signals (Re = A cos(theta),
// Im = A sin(theta)) into all 16 slots for two windows of 16 frames and
// checks against floating-point / integer references computed here:
//   * phase of every slot within 1 LSB of atan2, envelope = max(|Re|,|Im|);
//   * PLV and PAC of 8 channel pairs within 8 LSB (1/128) of the
//     l-infinity norm of the ideal mean vector (phase-locked pair, unlocked
//     pair, amplitude-modulated PAC pair, ...);
//   * spectral energy bit-exact against the integer mean of Re^2;
//   * win_valid once per 16 frames, frame once per 16 slots.
module tb_sync_extractor;
  import nsp_pkg::feat_cfg_t, nsp_pkg::FEAT_PLV, nsp_pkg::FEAT_PAC;
  localparam int NCH = 16, NFEAT = 8, WL = 4, NFR = 2**WL;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3:0] in_slot = 0;
  logic signed [9:0] in_re = 0, in_im = 0;
  feat_cfg_t feat_cfg [NFEAT];
  logic [3:0] win_log2 = 4'(WL);
  logic signed [9:0] phase [NCH];
  logic [9:0] amp [NCH];
  logic frame, win_valid;
  logic [9:0] feat [NFEAT], se [NCH];

  sync_extractor #(.NCH(NCH), .NFEAT(NFEAT)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_frame = 0, n_win = 0, frames_at_win = 0;
  real ph_ideal [NCH];
  int  re_q [NCH], im_q [NCH];
  real acc_c [NFEAT], acc_s [NFEAT];
  longint se_sum [NCH];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) begin
    if (rst_n && frame) n_frame++;
    if (rst_n && win_valid) begin
      n_win++;
      check(n_frame - frames_at_win == NFR, "window length in frames");
      frames_at_win = n_frame;
    end
  end

  function automatic real amp_of(int s, int n);
    real th4;
    th4 = 2.0 * PI * 0.013 * n + 0.2;
    case (s)
      5:       return 200.0 + 150.0 * $cos(th4);    // envelope locked to phase of slot 4
      default: return 100.0 + 20.0 * s;
    endcase
  endfunction

  function automatic real theta_of(int s, int n);
    case (s)
      0: return 2.0 * PI * 0.011 * n + 1.0;
      1: return 2.0 * PI * 0.011 * n + 0.7;         // locked to slot 0, 0.3 rad behind
      4: return 2.0 * PI * 0.013 * n + 0.2;
      default: return 2.0 * PI * (0.005 + 0.0031 * s) * n + 0.37 * s;
    endcase
  endfunction

  function automatic real wrap(real a);
    while (a >= PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    return a;
  endfunction

  initial begin
    feat_cfg[0] = '{FEAT_PLV, 4'd0, 4'd1};
    feat_cfg[1] = '{FEAT_PLV, 4'd2, 4'd3};
    feat_cfg[2] = '{FEAT_PAC, 4'd4, 4'd5};
    feat_cfg[3] = '{FEAT_PAC, 4'd0, 4'd7};
    feat_cfg[4] = '{FEAT_PLV, 4'd9, 4'd9};
    feat_cfg[5] = '{FEAT_PLV, 4'd15, 4'd8};
    feat_cfg[6] = '{FEAT_PAC, 4'd11, 4'd11};
    feat_cfg[7] = '{FEAT_PLV, 4'd1, 4'd0};
    for (int f = 0; f < NFEAT; f++) begin acc_c[f] = 0; acc_s[f] = 0; end
    for (int s = 0; s < NCH; s++) se_sum[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2 * NFR; n++) begin
      for (int s = 0; s < NCH; s++) begin
        real a, th;
        a = amp_of(s, n); th = theta_of(s, n);
        re_q[s] = int'($floor(a * $cos(th) + 0.5));
        im_q[s] = int'($floor(a * $sin(th) + 0.5));
        ph_ideal[s] = $atan2(real'(im_q[s]), real'(re_q[s]));
        se_sum[s] += longint'(re_q[s] * re_q[s]);
        @(negedge clk);
        in_valid = 1; in_slot = 4'(s); in_re = 10'(re_q[s]); in_im = 10'(im_q[s]);
        @(negedge clk);
        in_valid = 0;
        repeat (8) @(negedge clk);
        begin
          real e;
          int ax, ay;
          e = wrap(real'(phase[s]) / 512.0 * PI - ph_ideal[s]) / PI * 512.0;
          check(e <= 1.0 && e >= -1.0, $sformatf("phase slot %0d err %f", s, e));
          ax = re_q[s] < 0 ? -re_q[s] : re_q[s];
          ay = im_q[s] < 0 ? -im_q[s] : im_q[s];
          check(int'(amp[s]) == (ax > ay ? ax : ay), "envelope");
        end
      end
      // reference feature accumulation for this frame
      for (int f = 0; f < NFEAT; f++) begin
        int a_ch, b_ch;
        a_ch = int'(feat_cfg[f].ch_a); b_ch = int'(feat_cfg[f].ch_b);
        if (feat_cfg[f].kind == FEAT_PLV) begin
          acc_c[f] += $cos(ph_ideal[a_ch] - ph_ideal[b_ch]);
          acc_s[f] += $sin(ph_ideal[a_ch] - ph_ideal[b_ch]);
        end else begin
          int ax, ay, m;
          ax = re_q[b_ch] < 0 ? -re_q[b_ch] : re_q[b_ch];
          ay = im_q[b_ch] < 0 ? -im_q[b_ch] : im_q[b_ch];
          m  = ax > ay ? ax : ay;
          acc_c[f] += real'(m) / 512.0 * $cos(ph_ideal[a_ch]);
          acc_s[f] += real'(m) / 512.0 * $sin(ph_ideal[a_ch]);
        end
      end
      repeat (20) @(negedge clk);
      if ((n + 1) % NFR == 0) begin
        for (int f = 0; f < NFEAT; f++) begin
          real c, sn, r;
          c = acc_c[f] < 0 ? -acc_c[f] : acc_c[f];
          sn = acc_s[f] < 0 ? -acc_s[f] : acc_s[f];
          r = (c > sn ? c : sn) / real'(NFR) * 1024.0;
          if (r > 1023.0) r = 1023.0;
          check(real'(feat[f]) - r <= 8.0 && r - real'(feat[f]) <= 8.0,
                $sformatf("feature %0d = %0d, reference %f", f, feat[f], r));
          acc_c[f] = 0; acc_s[f] = 0;
        end
        for (int s = 0; s < NCH; s++) begin
          longint e;
          e = (se_sum[s] >> (WL + 8));
          if (e > 1023) e = 1023;
          check(longint'(se[s]) == e, $sformatf("se %0d = %0d expected %0d", s, se[s], e));
          se_sum[s] = 0;
        end
        $display("window %0d: PLV(0,1)=%0d PLV(2,3)=%0d PAC(4,5)=%0d", (n + 1) / NFR, feat[0], feat[1], feat[2]);
      end
    end
    check(n_frame == 2 * NFR, "frame count");
    check(n_win == 2, "two windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
