// fir_coef_mem: coefficient memory of the threefold FIR.
//
// DEPTH words of W-bit two's complement coefficients (Q1.15 by default),
// written one word per clock through the configuration port and read
// asynchronously by the shared multiply-accumulate engine, one tap per
// clock. The FIR engine lays it out as: decimation taps, then for each of
// the coefficient sets the bandpass taps followed by the Hilbert taps. The
// source design has programmable FIR coefficients held in an on-chip memory;
// the word width, the depth and the read timing are this design's. Reset
// clears every word, which makes every filter output zero until programmed.
module fir_coef_mem #(
  parameter int DEPTH = 208,
  parameter int W     = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic signed [W-1:0]      wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic signed [W-1:0]      rdata
);
  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we && int'(waddr) < DEPTH) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (int'(raddr) < DEPTH) ? mem[raddr] : '0;
endmodule
