// prbs10: 10-bit pseudo-random threshold generator.
//
// A Fibonacci LFSR with the primitive polynomial x^10 + x^7 + 1 steps once
// per clock in which 'step' is high and runs through all 1023 non-zero
// states. Its state is read as a signed 10b phase threshold, so the
// randomized phase-locking threshold covers [-pi, pi) uniformly (all codes
// but 0). The source design gives the 10b width and the use as threshold;
// the polynomial, the seed and when the sequence advances are this design's.
// A seed of zero is replaced by 1 so the register cannot lock up.
module prbs10 #(
  parameter logic [9:0] SEED = 10'h001
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  output logic [9:0] value
);
  localparam logic [9:0] SEED_NZ = (SEED == '0) ? 10'h001 : SEED;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    value <= SEED_NZ;
    else if (step) value <= {value[8:0], value[9] ^ value[6]};
  end
endmodule
