// linf_norm: l-infinity norm of a complex value, max(|x|, |y|).
//
// Used as a cheap stand-in for the Euclidean magnitude sqrt(x^2 + y^2): it
// is exact on the axes and reads 1/sqrt(2) of the true magnitude on the
// diagonals. The processor uses it for the per-sample amplitude envelope
// (x = Re, y = Im of the Hilbert pair) and for the magnitude of the
// windowed PLV/PAC vector sums, as the source design does. Purely
// combinational; the result is one bit wider than needed for |-2^(W-1)|.
module linf_norm #(
  parameter int W = 10   // input width, two's complement
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic        [W-1:0] mag   // unsigned, max(|x|, |y|) (2^(W-1) for -2^(W-1))
);
  logic [W-1:0] ax, ay;
  always_comb begin
    ax  = x[W-1] ? W'(-x) : W'(x);
    ay  = y[W-1] ? W'(-y) : W'(y);
    mag = (ax > ay) ? ax : ay;
  end
endmodule
