// sincos_lut: sine and cosine of a normalized phase.
//
// The phase is PH_W-bit two's complement in units of pi ([-1, 1) = [-pi, pi)).
// A quarter-wave table of 2^(PH_W-2) + 1 entries holds sin over [0, pi/2]
// (entry i = round(sin(i/2^(PH_W-2) * pi/2) * 2^OUT_F), clamped to
// 2^OUT_F - 1); the quadrant bits of the phase mirror and negate it, and the
// cosine is read as the sine of phase + 1/2. Outputs are OUT_F+1-bit two's
// complement with OUT_F fraction bits. The table organisation and widths are
// this design's own; the source design names only a "sin & cos LUT".
// Purely combinational.
module sincos_lut
  import nsp_pkg::sin_entry;
#(
  parameter int PH_W  = 10,
  parameter int OUT_F = 9
) (
  input  logic signed [PH_W-1:0]  phase,
  output logic signed [OUT_F:0]   sin_o,
  output logic signed [OUT_F:0]   cos_o
);
  localparam int QB = PH_W - 2;            // bits of the angle within a quadrant
  typedef logic [OUT_F-1:0] tab_t [2**QB + 1];

  function automatic tab_t mk_tab();
    tab_t t;
    for (int i = 0; i <= 2**QB; i++) t[i] = OUT_F'(sin_entry(i, QB, OUT_F));
    return t;
  endfunction
  localparam tab_t SIN_Q = mk_tab();

  function automatic logic signed [OUT_F:0] sin_of(logic [PH_W-1:0] p);
    logic [1:0]  quad;
    logic [QB:0] idx;
    logic [OUT_F-1:0] m;
    quad = p[PH_W-1 -: 2];
    // quadrants 0,2 rise from 0; quadrants 1,3 fall from the peak
    idx  = quad[0] ? (QB+1)'(2**QB) - (QB+1)'(p[QB-1:0]) : (QB+1)'(p[QB-1:0]);
    m    = SIN_Q[idx];
    // quadrant 2 and 3 (phase in [-1, 0)) are negative
    return quad[1] ? -(OUT_F+1)'(m) : (OUT_F+1)'(m);
  endfunction

  always_comb begin
    sin_o = sin_of(phase);
    cos_o = sin_of(phase + PH_W'(2**(PH_W-2)));
  end
endmodule
