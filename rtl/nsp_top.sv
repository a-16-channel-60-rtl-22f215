// nsp_top: digital core of the 16-channel neural synchrony processor with
// phase-locked stimulation.
//
// Signal flow (one 8 MHz clock, all rates derived from it):
//   channel_sequencer  - walks 16 slots of 125 clocks (64 kS/s in total,
//                        4 kS/s per slot), drives the 16:1 LNA multiplexer
//                        select and the ADC start, tags ADC results by slot
//   threefold_fir      - shared MAC: decimate x4 (to 1 kS/s), bandpass,
//                        Hilbert; gives Re/Im of each slot
//   sync_extractor     - phase (lpe) and envelope per slot (F_SMP, 1 kS/s);
//                        8 PLV/PAC features and 16 spectral energies per
//                        window (F_WIN, 1-4 Hz)
//   threshold_mem,
//   prbs10,
//   stim_controller    - phase-locking detector, three stimulation modes
//   pulse_gen          - biphasic pulses, charge-balancing windows and the
//                        stimulation rate limit for 4 channels
// The analog front end, the SAR ADC and the high-voltage stimulator output
// stages are outside: their digital controls are the ports below.
//
// Configuration is a write-only register bus (one word per clock, cfg_we):
//   0x800-0xFFF  FIR coefficients (Q1.15), word i at 0x800 + i: N_DEC
//                decimation taps, then for set 0 and set 1: N_BPF
//                bandpass taps, N_HT Hilbert taps (208 words by default)
//   0x100-0x10F  slot order: LNA read in slot s            (wdata[3:0])
//   0x110-0x11F  coefficient set of slot s                 (wdata[0])
//   0x120-0x127  feature f: {kind PAC=1, ch_a, ch_b}       (wdata[8:0])
//   0x130        window length 2^n frames                   (wdata[3:0], reset 8)
//   0x140-0x142  thresholds TH_SMP, TH_WIN,H, TH_WIN,L      (wdata[9:0])
//   0x150        {mode[1:0], th_prbs, fsmp[4:0], fwin[4:0]} (wdata[12:0])
//   0x151        {stim_on mask[3:0], pw[5:0]}               (wdata[9:0])
//   0x152        max stimulation frequency in Hz            (wdata[7:0])
//   0x160        run                                        (wdata[0])
// The register map and the clock are this design's; the source design only
// shows the blocks and their connections.
module nsp_top
  import nsp_pkg::*;
#(
  parameter int SLOT_CYCLES = 125,      // clocks per ADC slot (8 MHz / 64 kS/s)
  parameter int TICK_DIV    = 80,       // clocks per stimulator tick (10 us)
  parameter int N_DEC       = 16,
  parameter int N_BPF       = 64,
  parameter int N_HT        = 32,
  parameter int HT_DELAY    = 15
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // configuration bus
  input  logic                   cfg_we,
  input  logic [11:0]            cfg_addr,
  input  logic [15:0]            cfg_wdata,
  // analog front end / ADC
  output logic [CH_W-1:0]        mux_sel,
  output logic                   adc_start,
  input  logic                   adc_valid,
  input  logic [SMP_W-1:0]       adc_data,
  // stimulator phase controls, one bit per channel, and charge pump enable
  output logic [NSTIM-1:0]       stim_pos,
  output logic [NSTIM-1:0]       stim_neg,
  output logic [NSTIM-1:0]       stim_cb,
  output logic [NSTIM-1:0]       stim_pas,
  output logic                   en_cp,
  // features for monitoring
  output logic signed [PH_W-1:0] phase [NCH],
  output logic [SMP_W-1:0]       amp   [NCH],
  output logic [FEAT_W-1:0]      feat  [NFEAT],
  output logic [FEAT_W-1:0]      se    [NCH],
  output logic                   frame,
  output logic                   win_valid,
  output logic                   en_stim,
  output logic                   fir_overrun
);
  localparam int NSET   = 2;
  localparam int CDEPTH = N_DEC + NSET * (N_BPF + N_HT);   // at most 2048

  initial assert (CDEPTH <= 2048) else $error("coefficient space exceeds the 0x800 window");

  // ---------------------------------------------------------------------
  // Configuration registers
  // ---------------------------------------------------------------------
  logic        run;
  logic [0:0]  set_sel [NCH];
  feat_cfg_t   feat_cfg [NFEAT];
  logic [3:0]  win_log2;
  ctrl_sel_t   sel;
  logic [NSTIM-1:0] stim_mask;
  logic [5:0]  pw;
  logic [7:0]  freq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      win_log2  <= 4'd8;
      sel       <= '0;
      stim_mask <= '0;
      pw        <= '0;
      freq      <= '0;
      for (int i = 0; i < NCH; i++)   set_sel[i]  <= '0;
      for (int i = 0; i < NFEAT; i++) feat_cfg[i] <= '0;
    end else if (cfg_we) begin
      if (cfg_addr[11:4] == 8'h11) set_sel[cfg_addr[3:0]] <= cfg_wdata[0];
      if (cfg_addr[11:3] == 9'h024) feat_cfg[cfg_addr[2:0]] <= feat_cfg_t'(cfg_wdata[8:0]);
      unique case (cfg_addr)
        12'h130: win_log2  <= cfg_wdata[3:0];
        12'h150: sel       <= ctrl_sel_t'(cfg_wdata[12:0]);
        12'h151: begin stim_mask <= cfg_wdata[9:6]; pw <= cfg_wdata[5:0]; end
        12'h152: freq      <= cfg_wdata[7:0];
        12'h160: run       <= cfg_wdata[0];
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------------
  // Acquisition and filtering
  // ---------------------------------------------------------------------
  logic                    smp_valid;
  logic [CH_W-1:0]         smp_slot;
  logic signed [SMP_W-1:0] smp_data;

  channel_sequencer #(.NCH(NCH), .ADC_W(SMP_W), .SLOT_CYCLES(SLOT_CYCLES)) u_seq (
    .clk, .rst_n, .run,
    .ord_we(cfg_we && cfg_addr[11:4] == 8'h10), .ord_addr(cfg_addr[3:0]), .ord_wdata(cfg_wdata[3:0]),
    .mux_sel, .adc_start, .adc_valid, .adc_data,
    .smp_valid, .smp_slot, .smp_data
  );

  logic                    an_valid;
  logic [CH_W-1:0]         an_slot;
  logic signed [SMP_W-1:0] an_re, an_im;
  logic                    fir_busy;

  threefold_fir #(.NCH(NCH), .DEC(4), .N_DEC(N_DEC), .N_BPF(N_BPF), .N_HT(N_HT),
                  .HT_DELAY(HT_DELAY), .NSET(NSET), .SMP_W(SMP_W), .COEF_W(COEF_W)) u_fir (
    .clk, .rst_n,
    .in_valid(smp_valid), .in_slot(smp_slot), .in_data(smp_data),
    .set_sel,
    .coef_we(cfg_we && cfg_addr[11]),
    .coef_addr($clog2(CDEPTH)'(cfg_addr[10:0])), .coef_wdata(cfg_wdata),
    .out_valid(an_valid), .out_slot(an_slot), .out_re(an_re), .out_im(an_im),
    .busy(fir_busy), .overrun(fir_overrun)
  );

  // ---------------------------------------------------------------------
  // Phase synchrony processor
  // ---------------------------------------------------------------------
  sync_extractor #(.NCH(NCH), .NFEAT(NFEAT), .SMP_W(SMP_W), .PH_W(PH_W), .FEAT_W(FEAT_W)) u_sync (
    .clk, .rst_n,
    .in_valid(an_valid), .in_slot(an_slot), .in_re(an_re), .in_im(an_im),
    .feat_cfg, .win_log2,
    .phase, .amp, .frame, .feat, .se, .win_valid
  );

  logic [FEAT_W-1:0] th [3];
  logic [9:0]        prbs;
  logic              prbs_step, smp_hit, win_ok;

  threshold_mem #(.NTH(3), .W(FEAT_W)) u_th (
    .clk, .rst_n,
    .we(cfg_we && cfg_addr[11:2] == 10'h050), .waddr(cfg_addr[1:0]), .wdata(cfg_wdata[FEAT_W-1:0]),
    .th
  );

  prbs10 u_prbs (.clk, .rst_n, .step(prbs_step), .value(prbs));

  stim_controller #(.NCH(NCH), .NFEAT(NFEAT), .W(FEAT_W)) u_ctrl (
    .clk, .rst_n, .tick(frame), .sel,
    .phase, .amp, .feat, .se,
    .th_smp(th[0]), .th_win_h(th[1]), .th_win_l(th[2]), .prbs,
    .en_stim, .prbs_step, .smp_hit, .win_ok
  );

  // ---------------------------------------------------------------------
  // Stimulator timing
  // ---------------------------------------------------------------------
  logic [$clog2(TICK_DIV)-1:0] tdiv;
  logic                        tick;
  logic                        stim_busy, stim_started;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tdiv <= '0;
    else        tdiv <= (int'(tdiv) == TICK_DIV - 1) ? '0 : tdiv + 1'b1;
  end
  assign tick = (tdiv == '0);

  pulse_gen #(.NSTIM(NSTIM), .PW_W(6), .FREQ_W(8), .TICKS_PER_SEC(100_000)) u_pg (
    .clk, .rst_n, .tick, .trig(en_stim),
    .stim_on(stim_mask), .pw, .freq,
    .pos(stim_pos), .neg(stim_neg), .cb(stim_cb), .pas(stim_pas), .en_cp,
    .busy(stim_busy), .started(stim_started)
  );
endmodule
