// master_control: the MASTER CONTROL unit, which runs the readout through
// one accelerator cycle.
//
// Sequence after the ACCELERATOR pulse (each step starts when the previous
// one ends):
//   INT_DELAY_US   wait, then a one-cycle INTERRUPT (intr) to the computer so it
//                  can switch to direct memory access before the spill;
//                  READOUT ENABLE goes on with the interrupt
//   MON_LEN_US     MONITOR TIME, reserved for monitor triggers
//   BEAM_DELAY_US  wait
//   BEAM_LEN_US    BEAM GATE
//   SPILL_END_DELAY_US (10 ms)  the computer's SPILL TIME is extended past
//                  the beam gate, since a trigger may come at its very end
//   CLEAR TRIGGER  requested (level clear_trig_req) until the dead-time
//                  unit accepts it, which it does only when no event is in
//                  progress
//   READOUT_RESET_DELAY_US (10 ms)  READOUT ENABLE is kept on, then the
//                  system is disabled until the next ACCELERATOR pulse.
// READY is set by the computer's ENABLE pulse while READOUT ENABLE is on
// and cleared by the computer's CLEAR pulse or when READOUT ENABLE ends.
// ACCELERATOR pulses that arrive before the sequence has finished are
// ignored. The two 10 ms delays follow the document; the other durations
// are this design's defaults.
module master_control
  import readout_pkg::*;
#(
  parameter int unsigned MHZ                 = CLK_MHZ,
  parameter int unsigned INT_DELAY_US        = 100,
  parameter int unsigned MON_LEN_US          = 20000,
  parameter int unsigned BEAM_DELAY_US       = 30000,
  parameter int unsigned BEAM_LEN_US         = 1000000,
  parameter int unsigned SPILL_END_DELAY_US  = 10000,
  parameter int unsigned READOUT_RESET_DELAY_US = 10000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic accelerator,
  input  logic enable,          // computer ENABLE pulse
  input  logic clear,           // computer CLEAR pulse
  input  logic clear_trig_ack,
  output logic intr,
  output logic ready,
  output logic readout_enable,
  output logic monitor_time,
  output logic beam_gate,
  output logic spill_time,
  output logic clear_trig_req
);
  typedef enum logic [2:0] {
    M_IDLE, M_INT, M_MON, M_PREBEAM, M_BEAM, M_SPILL_END, M_CLR_TRIG, M_RO_RESET
  } mstate_e;
  mstate_e state;

  localparam int unsigned TW = 32;
  logic [TW-1:0] timer;

  function automatic logic [TW-1:0] cyc(int unsigned us);
    return TW'(us2cyc(us, MHZ) - 1);
  endfunction

  assign readout_enable = !(state == M_IDLE || state == M_INT);
  assign monitor_time   = (state == M_MON);
  assign beam_gate      = (state == M_BEAM);
  assign spill_time     = (state == M_BEAM) || (state == M_SPILL_END);
  assign clear_trig_req = (state == M_CLR_TRIG);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      timer     <= '0;
      intr <= 1'b0;
    end else begin
      intr <= 1'b0;
      if (timer != 0) timer <= timer - 1'b1;
      unique case (state)
        M_IDLE:      if (accelerator) begin state <= M_INT; timer <= cyc(INT_DELAY_US); end
        M_INT:       if (timer == 0) begin
                       intr <= 1'b1;
                       state <= M_MON;  timer <= cyc(MON_LEN_US);
                     end
        M_MON:       if (timer == 0) begin state <= M_PREBEAM;   timer <= cyc(BEAM_DELAY_US); end
        M_PREBEAM:   if (timer == 0) begin state <= M_BEAM;      timer <= cyc(BEAM_LEN_US); end
        M_BEAM:      if (timer == 0) begin state <= M_SPILL_END; timer <= cyc(SPILL_END_DELAY_US); end
        M_SPILL_END: if (timer == 0) state <= M_CLR_TRIG;
        M_CLR_TRIG:  if (clear_trig_ack) begin state <= M_RO_RESET; timer <= cyc(READOUT_RESET_DELAY_US); end
        M_RO_RESET:  if (timer == 0) state <= M_IDLE;
        default:     state <= M_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           ready <= 1'b0;
    else if (clear || !readout_enable)    ready <= 1'b0;
    else if (enable)                      ready <= 1'b1;
  end
endmodule
