// nsp_pkg: widths, types and lookup-table generators shared by the neural
// synchrony processor.
//
// Number formats used throughout:
//   * samples (ADC, FIR outputs, Re/Im)   : SMP_W-bit two's complement
//   * phase                                : PH_W-bit two's complement, the
//                                            angle divided by pi, so the code
//                                            range [-2^(PH_W-1), 2^(PH_W-1))
//                                            spans [-pi, pi)
//   * amplitude / windowed features        : FEAT_W-bit unsigned, full scale 1
//
// The lookup tables (reciprocal, phase error correction, sine) are computed
// at elaboration from their defining formulas, so no data files are needed.
package nsp_pkg;

  localparam int NCH     = 16;   // recording channels / FIR slots
  localparam int NSTIM   = 4;    // stimulation channels
  localparam int NFEAT   = 8;    // PLV/PAC features
  localparam int SMP_W   = 10;   // ADC and FIR output width
  localparam int PH_W    = 10;   // phase width
  localparam int FEAT_W  = 10;   // windowed feature width
  localparam int COEF_W  = 16;   // FIR coefficient width (Q1.15)
  localparam int CH_W    = $clog2(NCH);

  localparam real PI = 3.14159265358979323846;

  // Stimulation modes selected by SEL_MODE.
  typedef enum logic [1:0] {
    MODE_OFF      = 2'd0,
    MODE_SMP      = 2'd1,   // F_SMP-locked
    MODE_WIN      = 2'd2,   // F_WIN-locked
    MODE_SMP_WIN  = 2'd3    // F_SMP & F_WIN-locked
  } stim_mode_e;

  // Kind of one windowed synchrony feature (SEL_FWIN in the extractor).
  typedef enum logic {
    FEAT_PLV = 1'b0,   // phase locking value between two channels
    FEAT_PAC = 1'b1    // phase-amplitude coupling: phase of A, envelope of B
  } feat_kind_e;

  typedef struct packed {
    feat_kind_e        kind;
    logic [CH_W-1:0]   ch_a;   // phase channel
    logic [CH_W-1:0]   ch_b;   // second phase channel (PLV) or envelope channel (PAC)
  } feat_cfg_t;

  // Controller selection word.
  typedef struct packed {
    stim_mode_e  mode;      // SEL_MODE
    logic        th_prbs;   // SEL_TH: 1 = PRBS threshold, 0 = threshold memory
    logic [4:0]  fsmp;      // SEL_FSMP: 0..15 phase of channel, 16..31 envelope
    logic [4:0]  fwin;      // SEL_FWIN: 0..7 PLV/PAC feature, 8..23 SE of channel
  } ctrl_sel_t;

  // ---------------------------------------------------------------------
  // Table generators
  // ---------------------------------------------------------------------

  // Reciprocal of a normalized divisor taken at the middle of bin i:
  // d = 1 + (i + 0.5) / 2^ib, d in [1, 2); entry = round(2^ow / d).
  function automatic int recip_entry(int i, int ib, int ow);
    real d;
    d = 1.0 + (real'(i) + 0.5) / real'(2 ** ib);
    return int'($floor(real'(2 ** ow) / d + 0.5));
  endfunction

  // Phase error of the first-order interpolation atan(r)/pi ~ r/4 taken at
  // the middle of bin i of r in [0, 1], scaled by 2^ow.
  function automatic int atan_err_entry(int i, int ib, int ow);
    real r;
    r = (real'(i) + 0.5) / real'(2 ** ib);
    return int'($floor(($atan(r) / PI - r / 4.0) * real'(2 ** ow) + 0.5));
  endfunction

  // Sine of the first-quadrant angle (i / 2^ib) * pi/2, scaled by 2^ow and
  // clamped to 2^ow - 1.
  function automatic int sin_entry(int i, int ib, int ow);
    real v;
    int  q;
    v = $sin(real'(i) / real'(2 ** ib) * PI / 2.0) * real'(2 ** ow);
    q = int'($floor(v + 0.5));
    if (q > 2 ** ow - 1) q = 2 ** ow - 1;
    return q;
  endfunction

endpackage
