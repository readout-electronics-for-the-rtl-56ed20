// regime_ctrl: the REGIME circuit of the spark-chamber coordinate system.
//
// After a TRIGGER (arm) the first pulse of the delay-line chain is START;
// from then on the chain consists of one burst per pick-up coil. The
// circuit times each burst from its first pulse and makes a regime change
// SMALL_US (70 us) or LARGE_US (150 us) later, depending on whether the
// jumper for that burst marks a "small" (250x250 mm2) or "large"
// (400x600 mm2) chamber. At a regime change it pulses regime_change for
// one cycle and toggles sel in the following cycle, so the two ping-pong subchannels swap
// digitizing and transfer roles. After N_BURSTS changes the chain is done.
//
// If no pulse arrives within WAIT_US of START (first burst) or of the
// previous regime change, the burst is taken as empty and is timed as if
// it had begun GAP_US after that moment, so a chamber that gives no data
// (or a test chain that covers only the first burst) cannot stall the
// system and the regime change still falls in the gap before the next
// burst. GAP_US = 10 us is the spacing of the bursts (80 / 160 us) minus
// the regime (70 / 150 us); WAIT_US (> GAP_US) is this design's choice.
//
// large_jumpers[k] = 1: burst k is from a large chamber.
// Timing: regime_change is exactly SMALL_US*CLK_MHZ (or LARGE_US*CLK_MHZ)
// cycles after the cycle in which the burst's first pulse is presented.
module regime_ctrl
  import readout_pkg::*;
#(
  parameter int unsigned NB       = N_BURSTS,
  parameter int unsigned MHZ      = CLK_MHZ,
  parameter int unsigned SMALL_US = 70,
  parameter int unsigned LARGE_US = 150,
  parameter int unsigned WAIT_US  = 20,
  parameter int unsigned GAP_US   = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    arm,           // TRIGGER
  input  logic                    event_reset,
  input  logic                    pulse,         // X or Y chain
  input  logic [NB-1:0]           large_jumpers,
  output logic                    chain_started,
  output logic                    sel,
  output logic                    regime_change,
  output logic [$clog2(NB+1)-1:0] burst_idx,
  output logic                    chain_done,
  output logic [$clog2(NB+1)-1:0] empty_bursts
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_WAIT, S_TIME, S_DONE} state_e;
  state_e state;

  localparam int unsigned SMALL_CYC = us2cyc(SMALL_US, MHZ);
  localparam int unsigned LARGE_CYC = us2cyc(LARGE_US, MHZ);
  localparam int unsigned WAIT_CYC  = us2cyc(WAIT_US, MHZ);
  localparam int unsigned GAP_CYC   = us2cyc(GAP_US, MHZ);
  // timer reload for an empty burst: the WAIT_CYC - GAP_CYC already spent
  localparam int unsigned SMALL_EMPTY = SMALL_CYC - 2 - (WAIT_CYC - GAP_CYC);
  localparam int unsigned LARGE_EMPTY = LARGE_CYC - 2 - (WAIT_CYC - GAP_CYC);
  localparam int unsigned TW = $clog2(LARGE_CYC + SMALL_CYC + WAIT_CYC + 1);

  logic [TW-1:0] timer;
  logic          is_large;

  assign is_large      = large_jumpers[burst_idx];
  assign chain_started = (state == S_WAIT) || (state == S_TIME);
  assign chain_done    = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      sel           <= 1'b0;
      regime_change <= 1'b0;
      burst_idx     <= '0;
      timer         <= '0;
      empty_bursts  <= '0;
    end else begin
      regime_change <= 1'b0;
      // sel changes in the cycle after the regime_change pulse, so the
      // resets it triggers still see the subchannel roles of the old regime
      if (regime_change) sel <= ~sel;
      if (event_reset) begin
        state        <= S_IDLE;
        sel          <= 1'b0;
        burst_idx    <= '0;
        timer        <= '0;
        empty_bursts <= '0;
      end else begin
        unique case (state)
          S_IDLE:  if (arm) state <= S_START;
          S_START: if (pulse) begin
                     state <= S_WAIT;
                     timer <= TW'(WAIT_CYC - 1);
                   end
          S_WAIT:  if (pulse || timer == 0) begin
                     // burst begins: regime change after 70 / 150 us;
                     // the cycle of this pulse counts as the first one
                     state <= S_TIME;
                     if (pulse) begin
                       timer <= TW'((is_large ? LARGE_CYC : SMALL_CYC) - 2);
                     end else begin
                       timer        <= TW'(is_large ? LARGE_EMPTY : SMALL_EMPTY);
                       empty_bursts <= empty_bursts + 1'b1;
                     end
                   end else begin
                     timer <= timer - 1'b1;
                   end
          S_TIME:  if (timer == 0) begin
                     regime_change <= 1'b1;
                     burst_idx     <= burst_idx + 1'b1;
                     timer         <= TW'(WAIT_CYC - 1);
                     state         <= (32'(burst_idx) == NB - 1) ? S_DONE : S_WAIT;
                   end else begin
                     timer <= timer - 1'b1;
                   end
          S_DONE:  ;
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
