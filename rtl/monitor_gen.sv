// monitor_gen: source of MONITOR TRIGGERS and of the test information they
// produce.
//
// During MONITOR TIME a request pulse (mon_req) is produced every
// PERIOD_US by the internal generator, or on each pulse of the external
// generator when use_ext is set. When the dead-time unit has accepted a
// monitor trigger (trigger with kind TRIG_MONITOR), this block fires the
// light diodes of the counters (led_fire, one cycle) and plays a chain of
// TEST pulses into the START input of the delay lines: a START pulse, the
// test fiducial START_LEAD_US later, then N_TEST pulses spaced SPACING_US
// apart. The coordinate system then measures the known times
// k*SPACING_US (k = 1..N_TEST). The generator period and the chain's
// spacing are this design's choices; the 3-5 us lead of START follows the
// document.
module monitor_gen
  import readout_pkg::*;
#(
  parameter int unsigned MHZ           = CLK_MHZ,
  parameter int unsigned PERIOD_US     = 5000,
  parameter int unsigned START_LEAD_US = 4,
  parameter int unsigned SPACING_US    = 8,
  parameter int unsigned N_TEST        = N_SPARKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       monitor_time,
  input  logic       use_ext,
  input  logic       ext_gen,        // external generator, one-cycle pulses
  input  logic       trigger,
  input  trig_kind_e trig_kind,
  output logic       mon_req,
  output logic       led_fire,
  output logic       test_chain
);
  localparam int unsigned PER_CYC  = us2cyc(PERIOD_US, MHZ);
  localparam int unsigned LEAD_CYC = us2cyc(START_LEAD_US, MHZ);
  localparam int unsigned SP_CYC   = us2cyc(SPACING_US, MHZ);
  localparam int unsigned PW = $clog2(PER_CYC + 1);
  localparam int unsigned CW = $clog2((LEAD_CYC > SP_CYC ? LEAD_CYC : SP_CYC) + 1);
  localparam int unsigned NW = $clog2(N_TEST + 3);

  logic [PW-1:0] per_cnt;
  logic [CW-1:0] gap_cnt;
  logic [NW-1:0] left;      // test pulses still to send

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      per_cnt <= '0;
      mon_req <= 1'b0;
    end else begin
      mon_req <= 1'b0;
      if (!monitor_time) begin
        per_cnt <= '0;
      end else if (use_ext) begin
        mon_req <= ext_gen;
      end else if (per_cnt == 0) begin
        mon_req <= 1'b1;
        per_cnt <= PW'(PER_CYC - 1);
      end else begin
        per_cnt <= per_cnt - 1'b1;
      end
    end
  end

  // test chain: START, fiducial, N_TEST pulses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      led_fire   <= 1'b0;
      test_chain <= 1'b0;
      gap_cnt    <= '0;
      left       <= '0;
    end else begin
      led_fire   <= 1'b0;
      test_chain <= 1'b0;
      if (trigger && trig_kind == TRIG_MONITOR) begin
        led_fire   <= 1'b1;
        test_chain <= 1'b1;                  // START
        left       <= NW'(N_TEST + 1);       // fiducial + test pulses
        gap_cnt    <= CW'(LEAD_CYC - 1);
      end else if (left != 0) begin
        if (gap_cnt == 0) begin
          test_chain <= 1'b1;
          left       <= left - 1'b1;
          gap_cnt    <= CW'(SP_CYC - 1);
        end else begin
          gap_cnt <= gap_cnt - 1'b1;
        end
      end
    end
  end
endmodule
