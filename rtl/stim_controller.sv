// stim_controller: phase-locking detector and multi-mode stimulation control.
//
// Per-sample path (evaluated on every 'tick', once per 1 kS/s frame):
//   F_SMP  = selected phase (sel.fsmp < NCH) or envelope (sel.fsmp >= NCH)
//   TH_SMP = PRBS value (sel.th_prbs) or the stored threshold th_smp
//   hit    = (F_SMP > TH_SMP) now and not at the previous tick
// The comparison result is delayed by one sample (z^-1) and the event is
// its rising edge, so a stimulus fires once per threshold crossing; when the
// phase wraps from +pi to -pi the comparison falls instead of rising, so
// wrapping never triggers. Phases compare as signed numbers, envelopes as
// unsigned.
// Windowed path (level):
//   F_WIN  = selected PLV/PAC feature (sel.fwin < NFEAT) or spectral energy
//            (sel.fwin - NFEAT)
//   win_ok = TH_WIN,L < F_WIN < TH_WIN,H
// Modes (sel.mode): F_SMP-locked fires on 'hit'; F_WIN-locked fires on every
// tick while win_ok holds; F_SMP&F_WIN-locked fires on 'hit' while win_ok
// holds; off never fires. en_stim is a one-clock pulse; the stimulator's
// rate limit decides whether a pulse is delivered. prbs_step requests a new
// random threshold after each stimulus, so that randomized phase locking
// picks a fresh target phase per event.
// Selectors, comparators, the z^-1 crossing detector, the window
// comparators and the three modes follow the source design; the signedness
// rules, the crossing direction, the in-band reading of the two windowed
// thresholds and the PRBS advance are this design's.
module stim_controller
  import nsp_pkg::ctrl_sel_t, nsp_pkg::MODE_SMP, nsp_pkg::MODE_WIN, nsp_pkg::MODE_SMP_WIN;
#(
  parameter int NCH    = 16,
  parameter int NFEAT  = 8,
  parameter int W      = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  ctrl_sel_t         sel,
  input  logic signed [W-1:0] phase [NCH],
  input  logic [W-1:0]      amp   [NCH],
  input  logic [W-1:0]      feat  [NFEAT],
  input  logic [W-1:0]      se    [NCH],
  input  logic [W-1:0]      th_smp,
  input  logic [W-1:0]      th_win_h,
  input  logic [W-1:0]      th_win_l,
  input  logic [W-1:0]      prbs,
  output logic              en_stim,
  output logic              prbs_step,
  output logic              smp_hit,     // crossing seen at this tick
  output logic              win_ok
);
  logic [W-1:0] f_smp, th, f_win;
  logic         is_amp, above, above_q;

  always_comb begin
    is_amp = int'(sel.fsmp) >= NCH;
    f_smp  = is_amp ? amp[sel.fsmp[$clog2(NCH)-1:0]] : phase[sel.fsmp[$clog2(NCH)-1:0]];
    th     = sel.th_prbs ? prbs : th_smp;
    above  = is_amp ? (f_smp > th) : ($signed(f_smp) > $signed(th));
    if (int'(sel.fwin) < NFEAT) f_win = feat[sel.fwin[$clog2(NFEAT)-1:0]];
    else if (int'(sel.fwin) < NFEAT + NCH) f_win = se[$clog2(NCH)'(int'(sel.fwin) - NFEAT)];
    else f_win = '0;
    win_ok  = (f_win > th_win_l) && (f_win < th_win_h);
    smp_hit = tick && above && !above_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      above_q   <= 1'b1;    // no crossing reported at the first tick
      en_stim   <= 1'b0;
      prbs_step <= 1'b0;
    end else begin
      en_stim   <= 1'b0;
      prbs_step <= 1'b0;
      if (tick) begin
        above_q <= above;
        unique case (sel.mode)
          MODE_SMP:     en_stim <= smp_hit;
          MODE_WIN:     en_stim <= win_ok;
          MODE_SMP_WIN: en_stim <= smp_hit && win_ok;
          default:      en_stim <= 1'b0;
        endcase
        if (sel.th_prbs &&
            ((sel.mode == MODE_SMP && smp_hit) || (sel.mode == MODE_WIN && win_ok) ||
             (sel.mode == MODE_SMP_WIN && smp_hit && win_ok)))
          prbs_step <= 1'b1;
      end
    end
  end
endmodule
