// threshold_mem: register file holding the stimulation thresholds.
//
// NTH words of W bits, written one at a time through (we, waddr, wdata) and
// all readable in parallel, because the phase-locking detector compares
// against several at once. Word 0 is TH_SMP (per-sample threshold), word 1
// TH_WIN,H and word 2 TH_WIN,L (upper and lower windowed thresholds).
// The source design names a threshold memory; its size and layout are this
// design's. Reset clears all words.
module threshold_mem #(
  parameter int NTH = 3,
  parameter int W   = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [$clog2(NTH)-1:0] waddr,
  input  logic [W-1:0]           wdata,
  output logic [W-1:0]           th [NTH]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTH; i++) th[i] <= '0;
    end else if (we && int'(waddr) < NTH) begin
      th[waddr] <= wdata;
    end
  end
endmodule
