// dead_time_unit: forms the trigger GATE and the signals that follow a
// trigger.
//
// GATE is open when READY is set, BEAM GATE (or, for monitor triggers, the
// MONITOR TIME window) is on, DEAD TIME and CLEARING FIELD are off and the
// RESET level is on (the previous event has been read and cleared). A
// request arriving through the open gate becomes the one-cycle TRIGGER,
// which fires the spark-chamber HV pulsers and opens the gates of the
// proportional chambers, latches and accumulators (outside this block).
// The CLEAR TRIGGER request from the master control is accepted under the
// same conditions except the beam / monitor window; it is held by the
// master control until this unit acknowledges it, so it never overlaps a
// real event. Priority when several arrive together: real, monitor, clear.
//
// After a TRIGGER: DEAD TIME is on for DEAD_US; STROBE is on for STROBE_US
// and lets the amplifier pulses into the delay lines; START is a one-cycle
// pulse written into the delay lines at the start of STROBE; CLEARING FIELD
// is switched on CF_DELAY_US (0.5 ms) after the trigger for CF_LEN_US.
// DEAD_US, STROBE_US and CF_LEN_US are this design's values.
module dead_time_unit
  import readout_pkg::*;
#(
  parameter int unsigned MHZ         = CLK_MHZ,
  parameter int unsigned DEAD_US     = 1000,
  parameter int unsigned STROBE_US   = 160,
  parameter int unsigned CF_DELAY_US = 500,
  parameter int unsigned CF_LEN_US   = 1000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ready,
  input  logic       beam_gate,
  input  logic       monitor_time,
  input  logic       reset_level,     // previous event finished
  input  logic       real_req,        // fast-electronics trigger (pulse)
  input  logic       mon_req,         // monitor trigger (pulse)
  input  logic       clear_req,       // CLEAR TRIGGER request (level)
  output logic       gate,
  output logic       trigger,
  output trig_kind_e trig_kind,       // valid with trigger, held after
  output logic       clear_ack,
  output logic       dead_time,
  output logic       strobe,
  output logic       start_pulse,
  output logic       clearing_field
);
  localparam int unsigned DEAD_CYC = us2cyc(DEAD_US, MHZ);
  localparam int unsigned STR_CYC  = us2cyc(STROBE_US, MHZ);
  localparam int unsigned CFD_CYC  = us2cyc(CF_DELAY_US, MHZ);
  localparam int unsigned CFL_CYC  = us2cyc(CF_LEN_US, MHZ);
  localparam int unsigned TW = $clog2(DEAD_CYC + STR_CYC + CFD_CYC + CFL_CYC + 1);

  logic [TW-1:0] dead_cnt, str_cnt, cf_cnt;
  logic          cf_wait;
  logic          base_ok, acc_real, acc_mon, acc_clr;

  assign base_ok  = ready && !trigger && !dead_time && !clearing_field && reset_level && !cf_wait;
  assign gate     = base_ok && (beam_gate || monitor_time);
  assign acc_real = base_ok && beam_gate && real_req;
  assign acc_mon  = base_ok && monitor_time && mon_req && !acc_real;
  assign acc_clr  = base_ok && clear_req && !acc_real && !acc_mon;

  assign dead_time      = (dead_cnt != 0);
  assign strobe         = (str_cnt != 0);
  assign clearing_field = cf_wait ? 1'b0 : (cf_cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trigger     <= 1'b0;
      trig_kind   <= TRIG_REAL;
      clear_ack   <= 1'b0;
      start_pulse <= 1'b0;
      dead_cnt    <= '0;
      str_cnt     <= '0;
      cf_cnt      <= '0;
      cf_wait     <= 1'b0;
    end else begin
      trigger     <= acc_real || acc_mon || acc_clr;
      clear_ack   <= acc_clr;
      start_pulse <= trigger;
      if (acc_real)     trig_kind <= TRIG_REAL;
      else if (acc_mon) trig_kind <= TRIG_MONITOR;
      else if (acc_clr) trig_kind <= TRIG_CLEAR;

      if (trigger) begin
        dead_cnt <= TW'(DEAD_CYC);
        str_cnt  <= TW'(STR_CYC);
        cf_cnt   <= TW'(CFD_CYC - 2);
        cf_wait  <= 1'b1;
      end else begin
        if (dead_cnt != 0) dead_cnt <= dead_cnt - 1'b1;
        if (str_cnt  != 0) str_cnt  <= str_cnt  - 1'b1;
        if (cf_wait) begin
          if (cf_cnt == 0) begin
            cf_wait <= 1'b0;
            cf_cnt  <= TW'(CFL_CYC);
          end else begin
            cf_cnt <= cf_cnt - 1'b1;
          end
        end else if (cf_cnt != 0) begin
          cf_cnt <= cf_cnt - 1'b1;
        end
      end
    end
  end

  // a trigger is never accepted while the previous one still blocks the gate
  a_no_retrigger : assert property (@(posedge clk) disable iff (!rst_n)
    trigger |=> !trigger);
endmodule
