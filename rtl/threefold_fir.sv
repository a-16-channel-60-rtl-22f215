// threefold_fir: shared-hardware decimator, bandpass filter and Hilbert
// transformer for all recording channels.
//
// One multiplier and one adder (a multiply-accumulate unit) are reused for
// three FIR filters and for every channel, as in the source design:
//   1. decimation by DEC: each incoming sample of a slot is written into that
//      slot's decimation delay line; on every DEC-th sample of the slot an
//      N_DEC-tap low-pass FIR is evaluated,
//   2. its output enters the slot's bandpass delay line and an N_BPF-tap
//      bandpass FIR is evaluated,
//   3. the bandpass output enters the Hilbert delay line and an N_HT-tap
//      Hilbert FIR is evaluated.
// The analytic pair is out_re = bandpass output delayed by HT_DELAY samples
// (the Hilbert filter's group delay, (N_HT-2)/2 for an odd-length filter
// stored with a trailing zero tap) and out_im = Hilbert output. One job takes
// N_DEC + N_BPF + N_HT clocks (112 by default) and ends with a one-clock
// out_valid. Jobs are not queued: a job that would start while another runs
// sets the sticky 'overrun' flag and is lost, so the slot period of the
// channel sequencer must exceed the job length.
// After reset the engine spends NCH * max(N_DEC, N_BPF, N_HT) clocks
// clearing the delay-line memories; samples are ignored meanwhile.
// Delay lines are circular buffers (lengths must be powers of two) holding
// IW-bit samples: the SMP_W-bit input is scaled up by IW-SMP_W bits, and the
// outputs are scaled back with saturation. Products of Q1.15 coefficients
// are accumulated at full precision and rounded down by 15 bits per filter.
// Each slot selects one of NSET bandpass/Hilbert coefficient sets, so that
// one electrode can be filtered into two bands (e.g. theta phase and
// high-gamma amplitude for PAC) by addressing it in two slots.
// Decimation factor, shared multiplier/adder, the three filters and 16
// channels follow the source design; tap counts, widths, the coefficient
// sets and the job scheduling are this design's.
module threefold_fir #(
  parameter int NCH      = 16,
  parameter int DEC      = 4,
  parameter int N_DEC    = 16,
  parameter int N_BPF    = 64,
  parameter int N_HT     = 32,
  parameter int HT_DELAY = 15,
  parameter int NSET     = 2,
  parameter int SMP_W    = 10,
  parameter int IW       = 16,
  parameter int COEF_W   = 16,
  parameter int CDEPTH   = N_DEC + NSET * (N_BPF + N_HT)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // samples from the channel sequencer
  input  logic                           in_valid,
  input  logic [$clog2(NCH)-1:0]         in_slot,
  input  logic signed [SMP_W-1:0]        in_data,
  // per-slot coefficient set
  input  logic [$clog2(NSET)-1:0]        set_sel [NCH],
  // coefficient memory write port
  input  logic                           coef_we,
  input  logic [$clog2(CDEPTH)-1:0]      coef_addr,
  input  logic signed [COEF_W-1:0]       coef_wdata,
  // analytic signal out, one slot at a time
  output logic                           out_valid,
  output logic [$clog2(NCH)-1:0]         out_slot,
  output logic signed [SMP_W-1:0]        out_re,
  output logic signed [SMP_W-1:0]        out_im,
  output logic                           busy,
  output logic                           overrun
);
  localparam int CHW = $clog2(NCH);
  localparam int DW  = $clog2(N_DEC);
  localparam int BW  = $clog2(N_BPF);
  localparam int HW  = $clog2(N_HT);
  localparam int LW  = (DW > BW) ? ((DW > HW) ? DW : HW) : ((BW > HW) ? BW : HW);
  localparam int PHW = (DEC > 1) ? $clog2(DEC) : 1;
  localparam int CAW = $clog2(CDEPTH);
  localparam int ACC_W = IW + COEF_W + $clog2(N_BPF + N_DEC + N_HT);
  localparam int SH  = IW - SMP_W;

  initial begin
    assert (2**DW == N_DEC && 2**BW == N_BPF && 2**HW == N_HT)
      else $error("delay line lengths must be powers of two");
    assert (HT_DELAY < N_HT) else $error("HT_DELAY out of range");
  end

  typedef enum logic [2:0] {S_CLR, S_IDLE, S_DEC, S_BPF, S_HT} state_e;

  // delay lines: one memory per filter, NCH circular buffers each, addressed
  // {slot, position}; head pointers mark the newest sample of each buffer
  logic signed [IW-1:0] dec_mem [NCH*N_DEC];
  logic signed [IW-1:0] bpf_mem [NCH*N_BPF];
  logic signed [IW-1:0] ht_mem  [NCH*N_HT];
  logic [DW-1:0]  dec_head [NCH];
  logic [BW-1:0]  bpf_head [NCH];
  logic [HW-1:0]  ht_head  [NCH];
  logic [PHW-1:0] dec_ph   [NCH];

  state_e               state;
  logic [CHW-1:0]       cur;
  localparam int KW = (LW + 1 > 7) ? LW + 1 : 7;
  logic [KW-1:0]        k;          // tap index within the running filter
  logic [CHW+LW-1:0]    clr;        // clear address after reset
  logic signed [ACC_W-1:0] acc;

  // coefficient memory and the shared multiply-accumulate
  logic [CAW-1:0]          craddr;
  logic signed [COEF_W-1:0] coef;
  logic signed [IW-1:0]    tap;
  logic signed [ACC_W-1:0] acc_next;
  logic signed [IW-1:0]    y;        // rounded, saturated filter output
  logic                    last;

  fir_coef_mem #(.DEPTH(CDEPTH), .W(COEF_W)) u_coef (
    .clk, .rst_n,
    .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata),
    .raddr(craddr), .rdata(coef)
  );

  function automatic logic signed [IW-1:0] sat_iw(logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] s;
    s = v >>> (COEF_W - 1);
    if (s > ACC_W'(2**(IW-1) - 1))  return IW'(2**(IW-1) - 1);
    if (s < -ACC_W'(2**(IW-1)))     return IW'(-(2**(IW-1)));
    return IW'(s);
  endfunction

  function automatic logic signed [SMP_W-1:0] to_out(logic signed [IW-1:0] v);
    return SMP_W'(v >>> SH);
  endfunction

  logic [CAW-1:0] set_base;
  always_comb begin
    set_base = CAW'(N_DEC + int'(set_sel[cur]) * (N_BPF + N_HT));
    unique case (state)
      S_DEC:   begin craddr = CAW'(k);
                     tap  = dec_mem[{cur, DW'(dec_head[cur] - DW'(k))}];
                     last = (int'(k) == N_DEC - 1); end
      S_BPF:   begin craddr = set_base + CAW'(k);
                     tap  = bpf_mem[{cur, BW'(bpf_head[cur] - BW'(k))}];
                     last = (int'(k) == N_BPF - 1); end
      S_HT:    begin craddr = set_base + CAW'(N_BPF) + CAW'(k);
                     tap  = ht_mem[{cur, HW'(ht_head[cur] - HW'(k))}];
                     last = (int'(k) == N_HT - 1); end
      default: begin craddr = '0; tap = '0; last = 1'b0; end
    endcase
    acc_next = acc + ACC_W'(coef) * ACC_W'(tap);
    y        = sat_iw(acc_next);
  end

  assign busy = (state != S_IDLE);

  logic start;
  assign start = in_valid && state != S_CLR && (int'(dec_ph[in_slot]) == DEC - 1);

  // memory write ports
  logic                   dec_we, bpf_we, ht_we;
  logic [CHW+DW-1:0]      dec_wa;
  logic [CHW+BW-1:0]      bpf_wa;
  logic [CHW+HW-1:0]      ht_wa;
  logic signed [IW-1:0]   dec_wd, bpf_wd, ht_wd;

  always_comb begin
    if (state == S_CLR) begin
      dec_we = 1'b1; dec_wa = (CHW+DW)'(clr); dec_wd = '0;
      bpf_we = 1'b1; bpf_wa = (CHW+BW)'(clr); bpf_wd = '0;
      ht_we  = 1'b1; ht_wa  = (CHW+HW)'(clr); ht_wd  = '0;
    end else begin
      dec_we = in_valid;
      dec_wa = {in_slot, DW'(dec_head[in_slot] + 1'b1)};
      dec_wd = IW'(in_data) <<< SH;
      bpf_we = (state == S_DEC) && last;
      bpf_wa = {cur, BW'(bpf_head[cur] + 1'b1)};
      bpf_wd = y;
      ht_we  = (state == S_BPF) && last;
      ht_wa  = {cur, HW'(ht_head[cur] + 1'b1)};
      ht_wd  = y;
    end
  end

  always_ff @(posedge clk) if (dec_we) dec_mem[dec_wa] <= dec_wd;
  always_ff @(posedge clk) if (bpf_we) bpf_mem[bpf_wa] <= bpf_wd;
  always_ff @(posedge clk) if (ht_we)  ht_mem[ht_wa]   <= ht_wd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        dec_head[c] <= '0;
        bpf_head[c] <= '0;
        ht_head[c]  <= '0;
        dec_ph[c]   <= '0;
      end
      state     <= S_CLR;
      clr       <= '0;
      cur       <= '0;
      k         <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_slot  <= '0;
      out_re    <= '0;
      out_im    <= '0;
      overrun   <= 1'b0;
    end else begin
      out_valid <= 1'b0;

      // sample intake, in any state but the clear
      if (in_valid && state != S_CLR) begin
        dec_head[in_slot] <= dec_head[in_slot] + 1'b1;
        dec_ph[in_slot]   <= (int'(dec_ph[in_slot]) == DEC - 1) ? '0 : dec_ph[in_slot] + 1'b1;
        if (start && state != S_IDLE) overrun <= 1'b1;
      end

      unique case (state)
        S_CLR: begin
          clr <= clr + 1'b1;
          if (&clr) state <= S_IDLE;
        end
        S_IDLE: if (start) begin
          cur   <= in_slot;
          k     <= '0;
          acc   <= '0;
          state <= S_DEC;
        end
        S_DEC: if (last) begin
          bpf_head[cur] <= bpf_head[cur] + 1'b1;
          k <= '0; acc <= '0; state <= S_BPF;
        end else begin
          k <= k + 1'b1; acc <= acc_next;
        end
        S_BPF: if (last) begin
          ht_head[cur] <= ht_head[cur] + 1'b1;
          k <= '0; acc <= '0; state <= S_HT;
        end else begin
          k <= k + 1'b1; acc <= acc_next;
        end
        S_HT: if (last) begin
          out_valid <= 1'b1;
          out_slot  <= cur;
          out_im    <= to_out(y);
          // delayed bandpass sample; the head already holds the newest one
          out_re    <= to_out(ht_mem[{cur, HW'(ht_head[cur] - HW'(HT_DELAY))}]);
          state     <= S_IDLE;
        end else begin
          k <= k + 1'b1; acc <= acc_next;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a new decimated job must not arrive while one runs
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(start && state != S_IDLE))
    else $warning("threefold_fir: job overrun");
endmodule
