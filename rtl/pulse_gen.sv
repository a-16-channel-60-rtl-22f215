// pulse_gen: stimulation pulse generator of the 4-channel stimulator.
//
// On a trigger (EN_STIM from the stimulation controller) it plays one
// charge-balanced biphasic event on every channel enabled in stim_on:
//   POS for pw ticks -> NEG for pw ticks -> CB (active charge balancing
//   window) for CB_TICKS -> PAS (passive discharge) for PAS_TICKS -> idle.
// EN_CP (charge pump enable) is high during POS and NEG, while the
// high-voltage output stage is driven. stim_on and pw are captured when an
// event starts. All durations count 'tick', a
// clock enable that sets the time unit (10 us for the default
// TICKS_PER_SEC = 100000).
// Stimulation rate limit: an accumulator adds 'freq' every tick, saturating
// at TICKS_PER_SEC; a trigger is accepted only when it is full, and acceptance
// empties it. Consecutive events are therefore at least
// ceil(TICKS_PER_SEC / freq) ticks apart: freq is the maximum stimulation
// frequency in Hz (6 Hz in the in-vivo use). freq = 0 blocks stimulation.
// Triggers that arrive while an event runs or before the interval has
// passed are dropped. A trigger seen between ticks is held until the next
// tick, where the event starts; a trigger on a tick starts it at once.
// The ports STIM_on (4b), PW (6b), FREQ (8b) and the outputs POS, NEG, CB,
// PAS and EN_CP follow the source design's pulse generator; the phase order,
// the tick unit, the CB/PAS durations and the rate limiter are this design's.
module pulse_gen #(
  parameter int NSTIM         = 4,
  parameter int PW_W          = 6,
  parameter int FREQ_W        = 8,
  parameter int TICKS_PER_SEC = 100_000,
  parameter int CB_TICKS      = 20,
  parameter int PAS_TICKS     = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              trig,
  input  logic [NSTIM-1:0]  stim_on,
  input  logic [PW_W-1:0]   pw,
  input  logic [FREQ_W-1:0] freq,
  output logic [NSTIM-1:0]  pos,
  output logic [NSTIM-1:0]  neg,
  output logic [NSTIM-1:0]  cb,
  output logic [NSTIM-1:0]  pas,
  output logic              en_cp,
  output logic              busy,
  output logic              started   // one clock when an event starts
);
  typedef enum logic [2:0] {S_IDLE, S_POS, S_NEG, S_CB, S_PAS} state_e;

  localparam int AW = $clog2(TICKS_PER_SEC + 2**FREQ_W + 1);
  localparam int CW = $clog2(((2**PW_W) > CB_TICKS ? ((2**PW_W) > PAS_TICKS ? 2**PW_W : PAS_TICKS)
                                                   : (CB_TICKS > PAS_TICKS ? CB_TICKS : PAS_TICKS)) + 1);

  state_e           state;
  logic [CW-1:0]    cnt;       // ticks left in the current phase
  logic [AW-1:0]    acc;       // rate-limit accumulator
  logic [NSTIM-1:0] ch;        // channels of the running event
  logic [PW_W-1:0]  pw_l;      // pulse width of the running event
  logic             pending;
  logic             ready;

  assign ready = (acc == AW'(TICKS_PER_SEC)) && (freq != '0);
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      acc     <= '0;
      ch      <= '0;
      pw_l    <= '0;
      pending <= 1'b0;
      started <= 1'b0;
    end else begin
      started <= 1'b0;
      if (trig && !tick && state == S_IDLE && ready && stim_on != '0 && pw != '0)
        pending <= 1'b1;
      if (tick) begin
        if (acc + AW'(freq) >= AW'(TICKS_PER_SEC)) acc <= AW'(TICKS_PER_SEC);
        else                                       acc <= acc + AW'(freq);
        unique case (state)
          S_IDLE: if ((pending || trig) && ready && stim_on != '0 && pw != '0) begin
            pending <= 1'b0;
            started <= 1'b1;
            acc     <= AW'(freq);   // the start tick counts towards the interval
            ch      <= stim_on;
            pw_l    <= pw;
            cnt     <= CW'(pw) - 1'b1;
            state   <= S_POS;
          end
          S_POS: if (cnt == '0) begin cnt <= CW'(pw_l) - 1'b1;    state <= S_NEG; end
                 else cnt <= cnt - 1'b1;
          S_NEG: if (cnt == '0) begin cnt <= CW'(CB_TICKS - 1);   state <= S_CB;  end
                 else cnt <= cnt - 1'b1;
          S_CB:  if (cnt == '0) begin cnt <= CW'(PAS_TICKS - 1);  state <= S_PAS; end
                 else cnt <= cnt - 1'b1;
          S_PAS: if (cnt == '0) begin ch <= '0;                   state <= S_IDLE; end
                 else cnt <= cnt - 1'b1;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    pos   = (state == S_POS) ? ch : '0;
    neg   = (state == S_NEG) ? ch : '0;
    cb    = (state == S_CB)  ? ch : '0;
    pas   = (state == S_PAS) ? ch : '0;
    en_cp = (state == S_POS) || (state == S_NEG);
  end
endmodule
