// lpe: lightweight phase extractor.
//
// Computes the instantaneous phase atan2(im, re)/pi of a complex sample
// without CORDIC iterations:
//   1. range reduction: the magnitudes |re| and |im| are compared; the
//      smaller becomes the numerator and the larger the denominator, which
//      confines the angle to [0, pi/4) (the four sectors bounded by the
//      diagonals are called I..IV, I around +Re, II around +Im);
//   2. leading-zero detection normalizes the denominator so that its top
//      bit is set, and shifts the numerator by the same amount;
//   3. a reciprocal LUT (indexed by the bits below the normalized
//      denominator's top bit) and one multiplier give the ratio r in [0, 1];
//   4. first-order Lagrange interpolation: atan(r)/pi ~ r/4 (exact at r = 0
//      and r = 1); an error LUT indexed by r adds atan(r)/pi - r/4;
//   5. range reconstruction adds the sector offset and fraction sign:
//        I   :  0          + im/(4re)
//        II  :  1/2        - re/(4im)
//        III :  sign(im)   + im/(4re)
//        IV  : -1/2        - re/(4im)
// The result is a PH_W-bit two's complement phase in [-1, 1) (units of pi).
// The structure, the sector table and the 10b input/output widths follow the
// source design; the LUT sizes (RB, EB), the internal precision (RW, FR) and
// the single register stage are this design's choices, sized so that the
// error against an ideal atan2 stays within 1 LSB for every 10b input pair.
// For re = im = 0 the phase is 0; for re < 0, im = 0 it is -1 (= -pi).
//
// Interface: in_valid/re/im in, out_valid/phase one clock later.
module lpe
  import nsp_pkg::recip_entry, nsp_pkg::atan_err_entry;
#(
  parameter int IN_W = 10,  // width of re/im (two's complement)
  parameter int PH_W = 10,  // width of the phase output
  parameter int RB   = 8,   // reciprocal LUT index bits
  parameter int RW   = 12,  // reciprocal LUT entry precision (fraction bits)
  parameter int FR   = 14,  // fraction bits of the ratio and the phase fraction
  parameter int EB   = 7    // error LUT index bits
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] re,
  input  logic signed [IN_W-1:0] im,
  output logic                   out_valid,
  output logic signed [PH_W-1:0] phase
);

  localparam int LZW = $clog2(IN_W + 1);

  // ---------------------------------------------------------------------
  // Lookup tables, computed at elaboration
  // ---------------------------------------------------------------------
  typedef logic [RW:0]   recip_tab_t [2**RB];
  typedef logic [FR-1:0] err_tab_t   [2**EB];

  function automatic recip_tab_t mk_recip();
    recip_tab_t t;
    for (int i = 0; i < 2**RB; i++) t[i] = (RW+1)'(recip_entry(i, RB, RW));
    return t;
  endfunction

  function automatic err_tab_t mk_err();
    err_tab_t t;
    for (int i = 0; i < 2**EB; i++) t[i] = FR'(atan_err_entry(i, EB, FR));
    return t;
  endfunction

  localparam recip_tab_t RECIP_LUT = mk_recip();
  localparam err_tab_t   ERR_LUT   = mk_err();

  // ---------------------------------------------------------------------
  // Sign detection, magnitude and comparator
  // ---------------------------------------------------------------------
  logic [IN_W-1:0] mag_re, mag_im, num, den;
  logic            swap;            // |im| > |re|: sectors II / IV

  always_comb begin
    mag_re = re[IN_W-1] ? IN_W'(-re) : IN_W'(re);
    mag_im = im[IN_W-1] ? IN_W'(-im) : IN_W'(im);
    swap   = mag_im > mag_re;
    num    = swap ? mag_re : mag_im;
    den    = swap ? mag_im : mag_re;
  end

  // ---------------------------------------------------------------------
  // Leading-zero detection and normalizing shifts
  // ---------------------------------------------------------------------
  logic [LZW-1:0]  lz;
  logic [IN_W-1:0] den_n, num_n;

  always_comb begin
    lz = '0;
    for (int b = 0; b < IN_W; b++)
      if (den[b]) lz = LZW'(IN_W - 1 - b);
    den_n = den << lz;
    num_n = num << lz;
  end

  // ---------------------------------------------------------------------
  // Reciprocal LUT, multiplier and shift: r = num/den with FR fraction bits
  // ---------------------------------------------------------------------
  localparam int PW = IN_W + RW + 1;
  logic [RB-1:0]  r_idx;
  logic [RW:0]    recip;
  logic [PW-1:0]  prod;
  logic [FR:0]    ratio;            // 0 .. 1.0 inclusive

  always_comb begin
    // bits below the leading one; zero-padded when IN_W-1 < RB
    r_idx = RB'(({den_n[IN_W-2:0], {RB{1'b0}}}) >> (IN_W - 1));
    recip = RECIP_LUT[r_idx];
    prod  = PW'(num_n) * PW'(recip);
    ratio = (FR+1)'(prod >> (IN_W - 1 + RW - FR));
    if (ratio > (FR+1)'(2**FR)) ratio = (FR+1)'(2**FR);
  end

  // ---------------------------------------------------------------------
  // Interpolation and error LUT: frac = r/4 + (atan(r)/pi - r/4)
  // ---------------------------------------------------------------------
  logic [EB-1:0] e_idx;
  logic [FR-1:0] frac;              // 0 .. 1/4 with FR fraction bits

  always_comb begin
    e_idx = (ratio[FR]) ? {EB{1'b1}} : ratio[FR-1 -: EB];
    frac  = FR'(ratio >> 2) + ERR_LUT[e_idx];
  end

  // ---------------------------------------------------------------------
  // Offset, fraction sign and range reconstruction
  // ---------------------------------------------------------------------
  localparam int AW = FR + 2;       // two integer bits: range [-2, 2)
  localparam logic signed [AW-1:0] HALF = AW'(2**(FR-1));
  localparam logic signed [AW-1:0] ONE  = AW'(2**FR);

  logic signed [AW-1:0] offset, acc;
  logic                 frac_neg;
  logic                 re_neg, im_neg;
  logic signed [PH_W-1:0] ph_next;

  always_comb begin
    re_neg = re[IN_W-1];
    im_neg = im[IN_W-1];
    if (!swap && !re_neg) begin            // sector I
      offset   = '0;
      frac_neg = im_neg;
    end else if (!swap) begin              // sector III
      offset   = im_neg || (im == '0) ? -ONE : ONE;
      frac_neg = !(im_neg || (im == '0));
    end else if (!im_neg) begin            // sector II
      offset   = HALF;
      frac_neg = !re_neg;
    end else begin                         // sector IV
      offset   = -HALF;
      frac_neg = re_neg;
    end
    acc = frac_neg ? offset - AW'(frac) : offset + AW'(frac);
    if (den == '0) acc = '0;
    // round to PH_W-1 fraction bits; +1 wraps to -1 in two's complement
    ph_next = PH_W'((acc + AW'(2**(FR-PH_W))) >>> (FR - PH_W + 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phase     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) phase <= ph_next;
    end
  end

endmodule
