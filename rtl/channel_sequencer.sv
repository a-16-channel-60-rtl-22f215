// channel_sequencer: drives the 16:1 input multiplexer and the shared ADC.
//
// The recording channels share one integrator and one SAR ADC. The
// sequencer divides time into slots of SLOT_CYCLES clocks and walks through
// NCH slots in a loop; slot s addresses the LNA stored in entry s of a
// programmable order table, so channels can be read in any order, and one
// LNA may appear in several slots. At the first clock of each slot it sets
// mux_sel and pulses adc_start; the ADC answers with adc_valid/adc_data at
// any later clock of the same slot. The result is passed on as a sample of
// that slot, converted from the ADC's offset-binary code to two's complement
// (MSB inverted). With NCH = 16 slots, SLOT_CYCLES = 125 and an 8 MHz
// clock, every slot is sampled at 4 kS/s, the per-channel ADC rate of the
// source design. The order table resets to the identity (slot s -> LNA s).
// The multiplexer, the user-defined order and the rate follow the source
// design; the slot timing, the offset-binary code and the table are this
// design's.
module channel_sequencer #(
  parameter int NCH         = 16,
  parameter int ADC_W       = 10,
  parameter int SLOT_CYCLES = 125
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  // order table write port
  input  logic                    ord_we,
  input  logic [$clog2(NCH)-1:0]  ord_addr,
  input  logic [$clog2(NCH)-1:0]  ord_wdata,
  // analog front end and ADC
  output logic [$clog2(NCH)-1:0]  mux_sel,
  output logic                    adc_start,
  input  logic                    adc_valid,
  input  logic [ADC_W-1:0]        adc_data,
  // tagged samples
  output logic                    smp_valid,
  output logic [$clog2(NCH)-1:0]  smp_slot,
  output logic signed [ADC_W-1:0] smp_data
);
  localparam int CHW = $clog2(NCH);
  localparam int CW  = $clog2(SLOT_CYCLES);

  logic [CHW-1:0] order [NCH];
  logic [CHW-1:0] slot;
  logic [CW-1:0]  cyc;
  logic           active;     // a conversion of this slot is outstanding

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) order[i] <= CHW'(i);
      slot      <= '0;
      cyc       <= '0;
      active    <= 1'b0;
      mux_sel   <= '0;
      adc_start <= 1'b0;
      smp_valid <= 1'b0;
      smp_slot  <= '0;
      smp_data  <= '0;
    end else begin
      adc_start <= 1'b0;
      smp_valid <= 1'b0;
      if (ord_we) order[ord_addr] <= ord_wdata;

      if (run) begin
        if (cyc == '0) begin
          mux_sel   <= order[slot];
          adc_start <= 1'b1;
          active    <= 1'b1;
        end
        if (int'(cyc) == SLOT_CYCLES - 1) begin
          cyc    <= '0;
          slot   <= (int'(slot) == NCH - 1) ? '0 : slot + 1'b1;
          active <= 1'b0;
        end else begin
          cyc <= cyc + 1'b1;
        end
      end else begin
        cyc    <= '0;
        slot   <= '0;
        active <= 1'b0;
      end

      if (adc_valid && active) begin
        smp_valid <= 1'b1;
        smp_slot  <= slot;
        smp_data  <= {~adc_data[ADC_W-1], adc_data[ADC_W-2:0]};
        active    <= 1'b0;
      end
    end
  end
endmodule
