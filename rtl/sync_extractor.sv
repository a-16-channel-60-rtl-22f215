// sync_extractor: cross-regional phase synchrony extractor.
//
// Takes the analytic signal (Re = bandpass, Im = Hilbert) of every slot from
// the threefold FIR and produces
//   * per-sample features F_SMP, updated for every slot at 1 kS/s:
//       phase[s] - from the lightweight phase extractor (lpe), units of pi
//       amp[s]   - amplitude envelope, l-infinity norm max(|Re|, |Im|)
//   * windowed features F_WIN, updated once per window of 2^win_log2 frames
//     (256..1024 frames = 3.9..0.98 Hz at 1 kS/s):
//       feat[f], f < NFEAT - PLV or PAC of a channel pair (feat_cfg[f]):
//         PLV = || mean(exp(j(phase[a] - phase[b]))) ||
//         PAC = || mean(amp[b] * exp(j phase[a])) ||
//       se[s] - spectral energy of the slot's band, mean(Re^2)
// where || . || is the l-infinity norm of the (sum cos, sum sin) vector.
// A frame ends when the last slot (NCH-1) has been processed; 'frame'
// then pulses, and a small engine walks the NFEAT features in NFEAT clocks
// through one shared sin/cos LUT and two multipliers (angle select: phase
// difference for PLV, phase for PAC; the second operand is 1 for PLV and the
// envelope for PAC) and adds the terms to per-feature cos/sin accumulators.
// At the end of a window the features are normalized, latched, and
// 'win_valid' pulses; accumulators restart from zero.
// Formats: phase signed PH_W (units of pi); amp unsigned, 2^(SMP_W-1) = full
// scale; feat and se unsigned FEAT_W with full scale 2^FEAT_W = 1.0
// (saturated at 2^FEAT_W - 1); se full scale is a full-scale Re, squared.
// The features, the l-infinity approximations, the sin/cos LUT, the shared
// multiply and the 8 PLV/PAC features follow the source design; the window
// lengths as powers of two, the frame scheduling and the SE definition as
// the mean squared bandpass output are this design's.
module sync_extractor
  import nsp_pkg::feat_cfg_t, nsp_pkg::FEAT_PAC;
#(
  parameter int NCH    = 16,
  parameter int NFEAT  = 8,
  parameter int SMP_W  = 10,
  parameter int PH_W   = 10,
  parameter int FEAT_W = 10,
  parameter int ACC_W  = 28
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // analytic signal from the FIR
  input  logic                     in_valid,
  input  logic [$clog2(NCH)-1:0]   in_slot,
  input  logic signed [SMP_W-1:0]  in_re,
  input  logic signed [SMP_W-1:0]  in_im,
  // configuration
  input  feat_cfg_t                feat_cfg [NFEAT],
  input  logic [3:0]               win_log2,
  // per-sample features
  output logic signed [PH_W-1:0]   phase [NCH],
  output logic [SMP_W-1:0]         amp   [NCH],
  output logic                     frame,
  // windowed features
  output logic [FEAT_W-1:0]        feat  [NFEAT],
  output logic [FEAT_W-1:0]        se    [NCH],
  output logic                     win_valid
);
  localparam int CHW  = $clog2(NCH);
  localparam int FW   = $clog2(NFEAT);
  localparam int TF   = PH_W - 1;           // fraction bits of sin/cos terms
  localparam int SE_W = (2 * SMP_W + 16 > ACC_W + 8) ? 2 * SMP_W + 16 : ACC_W + 8;

  // ---------------------------------------------------------------------
  // Per-sample path: phase extractor, envelope, energy
  // ---------------------------------------------------------------------
  logic                  lpe_valid;
  logic signed [PH_W-1:0] lpe_phase;
  logic [CHW-1:0]        slot_d;
  logic [SMP_W-1:0]      mag;

  lpe #(.IN_W(SMP_W), .PH_W(PH_W)) u_lpe (
    .clk, .rst_n, .in_valid, .re(in_re), .im(in_im),
    .out_valid(lpe_valid), .phase(lpe_phase)
  );

  linf_norm #(.W(SMP_W)) u_env (.x(in_re), .y(in_im), .mag);

  logic [SE_W-1:0] se_acc [NCH];
  logic [15:0]     frame_cnt;
  logic            win_last;

  assign win_last = (frame_cnt == 16'((32'd1 << win_log2) - 1));

  function automatic logic [FEAT_W-1:0] sat_feat(logic [SE_W-1:0] v);
    return (v > SE_W'(2**FEAT_W - 1)) ? FEAT_W'(2**FEAT_W - 1) : FEAT_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_d <= '0;
      frame  <= 1'b0;
      for (int s = 0; s < NCH; s++) begin
        phase[s]  <= '0;
        amp[s]    <= '0;
        se_acc[s] <= '0;
        se[s]     <= '0;
      end
    end else begin
      frame <= 1'b0;
      if (in_valid) begin
        slot_d          <= in_slot;
        amp[in_slot]    <= mag;
        se_acc[in_slot] <= se_acc[in_slot] + SE_W'($unsigned(32'(in_re * in_re)));
      end
      if (lpe_valid) begin
        phase[slot_d] <= lpe_phase;
        if (int'(slot_d) == NCH - 1) frame <= 1'b1;
      end
      // energy: mean(Re^2) scaled so that full-scale Re^2 = 2^FEAT_W
      if (frame && win_last) begin
        for (int s = 0; s < NCH; s++) begin
          se[s]     <= sat_feat(se_acc[s] >> (32'(win_log2) + 32'(2 * (SMP_W - 1) - FEAT_W)));
          se_acc[s] <= '0;
        end
      end
    end
  end

  // ---------------------------------------------------------------------
  // Windowed PLV / PAC engine
  // ---------------------------------------------------------------------
  logic                   busy;
  logic                   last_win;    // the running pass closes a window
  logic [FW-1:0]          f;
  logic signed [ACC_W-1:0] acc_c [NFEAT];
  logic signed [ACC_W-1:0] acc_s [NFEAT];

  feat_cfg_t              cfg;
  logic signed [PH_W-1:0] angle;
  logic signed [TF:0]     sin_v, cos_v;
  logic [SMP_W-1:0]       a_pac;
  logic signed [PH_W+SMP_W+1:0] p_sin, p_cos;
  logic signed [ACC_W-1:0] term_s, term_c, nxt_s, nxt_c;
  logic [ACC_W-1:0]        norm;

  sincos_lut #(.PH_W(PH_W), .OUT_F(TF)) u_sc (.phase(angle), .sin_o(sin_v), .cos_o(cos_v));
  linf_norm  #(.W(ACC_W)) u_vec (.x(nxt_c), .y(nxt_s), .mag(norm));

  always_comb begin
    cfg   = feat_cfg[f];
    a_pac = amp[cfg.ch_b];
    // angle select: phase difference (PLV) or phase (PAC)
    angle = (cfg.kind == FEAT_PAC) ? phase[cfg.ch_a] : phase[cfg.ch_a] - phase[cfg.ch_b];
    p_sin = $signed({1'b0, a_pac}) * sin_v;
    p_cos = $signed({1'b0, a_pac}) * cos_v;
    // term select: sin/cos (PLV) or envelope * sin/cos (PAC), both with TF fraction bits
    term_s = (cfg.kind == FEAT_PAC) ? ACC_W'(p_sin >>> (SMP_W - 1)) : ACC_W'(sin_v);
    term_c = (cfg.kind == FEAT_PAC) ? ACC_W'(p_cos >>> (SMP_W - 1)) : ACC_W'(cos_v);
    nxt_s  = acc_s[f] + term_s;
    nxt_c  = acc_c[f] + term_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      last_win  <= 1'b0;
      f         <= '0;
      frame_cnt <= '0;
      win_valid <= 1'b0;
      for (int i = 0; i < NFEAT; i++) begin
        acc_c[i] <= '0;
        acc_s[i] <= '0;
        feat[i]  <= '0;
      end
    end else begin
      win_valid <= 1'b0;
      if (frame) begin
        busy      <= 1'b1;
        f         <= '0;
        last_win  <= win_last;
        frame_cnt <= win_last ? '0 : frame_cnt + 1'b1;
      end else if (busy) begin
        if (last_win) begin
          // mean of the vector with TF fraction bits -> FEAT_W fraction bits
          feat[f]  <= sat_feat((SE_W'(norm) << (FEAT_W - TF)) >> win_log2);
          acc_c[f] <= '0;
          acc_s[f] <= '0;
        end else begin
          acc_c[f] <= nxt_c;
          acc_s[f] <= nxt_s;
        end
        if (int'(f) == NFEAT - 1) begin
          busy      <= 1'b0;
          win_valid <= last_win;
        end
        f <= f + 1'b1;
      end
    end
  end
endmodule
