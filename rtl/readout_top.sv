// readout_top: the readout electronics of the pi-e experiment.
//
// The system is synchronised with the accelerator and connected to a
// 16-bit computer. Per accelerator cycle the master control interrupts the
// computer, opens MONITOR TIME (monitor triggers with test information) and
// the BEAM GATE, and after the spill issues a CLEAR TRIGGER and finally
// disables the readout. A trigger passes the dead-time unit's GATE only
// when the computer is READY and the previous event has been cleared.
//
// Each trigger freezes an event: the spark chambers are read through two
// magnetostrictive delay lines (X and Y, outside this design: their write
// and read signals are ports). Each line's pulse chain is digitized by a
// ping-pong pair of subchannels (6-spark switch + 6 scalers counting the
// 20 MHz clock) under the REGIME circuit; 16 accumulators count the
// counters' pulses; latches and the 80-channel proportional-chamber memory
// take gated snapshots; the DVM scanner and the fixed-data switches add
// slow information. The READOUT unit sends the 336-word event over the
// DATA BUS with a FLAG / ENABLE handshake, 12 chamber words at every
// regime change while the next burst is digitized, then the accumulator,
// proportional-chamber and fixed-data groups. The computer's CLEAR pulse
// ends the event and resets all systems.
//
// Event format (word: contents), all words 16 bits:
//   0-299   25 blocks of {X scaler 0..5, Y scaler 0..5} (14-bit counts)
//   300-311 accumulators 0..11
//   312-316 proportional-chamber wires 0..79, 16 per word, wire 0 = bit 0
//   317-321 zero
//   322-323 MAGIC_WORD and ~MAGIC_WORD in the CLEAR TRIGGER event, else 0
//   324-327 fixed-data switches, 4 BCD digits per word
//   328-329 latches 0..31
//   330     DVM reading
//   331     {valid, 10'b0, test point number}
//   332-335 accumulators 12..15
// The packing of the three short groups into their 12 words is this
// design's choice; the group sizes and order follow the document.
// Clock: one system clock of CLK_MHZ (100 MHz); external inputs are
// synchronised where they are counted as pulses (delay-line chains,
// accumulator inputs, fast trigger, accelerator); the computer's ENABLE and
// CLEAR, the operator controls and the latch / proportional-chamber inputs
// are taken as synchronous to the clock.
module readout_top
  import readout_pkg::*;
#(
  parameter int unsigned NB                     = N_BURSTS,
  parameter int unsigned INT_DELAY_US           = 100,
  parameter int unsigned MON_LEN_US             = 20000,
  parameter int unsigned BEAM_DELAY_US          = 30000,
  parameter int unsigned BEAM_LEN_US            = 1000000,
  parameter int unsigned SPILL_END_DELAY_US     = 10000,
  parameter int unsigned READOUT_RESET_DELAY_US = 10000,
  parameter int unsigned DEAD_US                = 1000,
  parameter int unsigned STROBE_US              = 160,
  parameter int unsigned CF_LEN_US              = 1000,
  parameter int unsigned MON_PERIOD_US          = 5000,
  parameter int unsigned DVM_SETTLE_US          = 5000,
  parameter int unsigned PROP_GATE_NS           = 100
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // accelerator and fast electronics
  input  logic                   accelerator,
  input  logic                   fast_trigger,
  input  logic                   ext_monitor_gen,
  // computer interface
  output logic                   comp_interrupt,
  output logic                   spill_time,
  input  logic                   comp_enable,
  input  logic                   comp_clear,
  output logic                   flag,
  output logic [WORD_W-1:0]      data_bus,
  // operator settings
  input  logic                   use_ext_gen,
  input  logic                   acc_mode_after,
  input  logic [NB-1:0]          large_jumpers,
  input  logic [15:0][9:0]       fixed_switches,
  input  logic                   ind_stop_en,
  input  logic [WCNT_W-1:0]      ind_stop_word,
  input  logic                   ind_cont,
  output logic [WORD_W-1:0]      ind_display,
  output logic [WCNT_W-1:0]      ind_word,
  // spark chambers: amplifier-discriminators, HV pulsers, delay lines
  input  logic [NB-1:0]          amp_x,
  input  logic [NB-1:0]          amp_y,
  output logic                   hv_fire,
  output logic                   clearing_field,
  output logic [NB-1:0]          dl_x_write,
  output logic [NB-1:0]          dl_y_write,
  output logic                   dl_start_write,
  input  logic                   dl_x_read,
  input  logic                   dl_y_read,
  // counters, latches, proportional chambers, monitor light diodes
  input  logic [15:0]            acc_in,
  input  logic [31:0]            latch_in,
  input  logic [79:0]            prop_in,
  output logic                   led_fire,
  // DVM
  output logic [31:0]            dvm_relay,
  output logic                   dvm_trigger,
  input  logic                   dvm_done,
  input  logic [WORD_W-1:0]      dvm_value,
  // status
  output logic                   ready,
  output logic                   readout_enable,
  output logic                   monitor_time,
  output logic                   beam_gate,
  output logic                   trig_gate,
  output logic                   trigger,
  output trig_kind_e             trig_kind,
  output logic                   dead_time,
  output logic                   strobe,
  output logic                   event_active,
  output logic                   acc_counting,
  output logic                   event_complete,
  output logic [WCNT_W-1:0]      word_count,
  output group_e                 group,
  output logic                   regime_change,
  output logic                   chain_done,
  output logic [$clog2(NB+1)-1:0] empty_bursts
);
  localparam int unsigned WPG = WORDS_PER_GRP;

  // ---------------- clocks and input synchronisation ----------------
  logic tick;
  tick_gen #(.DIV(CLK_MHZ / 20)) u_tick (.clk, .rst_n, .tick);

  logic px, py, fast_trig_p, ext_gen_p;
  logic [15:0] acc_p;
  pulse_sync #(.N(20)) u_sync (
    .clk, .rst_n,
    .in   ({acc_in, dl_x_read, dl_y_read, fast_trigger, ext_monitor_gen}),
    .rise ({acc_p, px, py, fast_trig_p, ext_gen_p})
  );

  logic accel_p;
  pulse_sync #(.N(1)) u_sync_acc (.clk, .rst_n, .in(accelerator), .rise(accel_p));

  // ---------------- control ----------------
  logic clear_trig_req, clear_trig_ack, mon_req, start_pulse, test_chain;
  logic event_reset;
  assign event_reset = comp_clear;

  master_control #(
    .INT_DELAY_US(INT_DELAY_US), .MON_LEN_US(MON_LEN_US),
    .BEAM_DELAY_US(BEAM_DELAY_US), .BEAM_LEN_US(BEAM_LEN_US),
    .SPILL_END_DELAY_US(SPILL_END_DELAY_US),
    .READOUT_RESET_DELAY_US(READOUT_RESET_DELAY_US)
  ) u_master (
    .clk, .rst_n,
    .accelerator    (accel_p),
    .enable         (comp_enable),
    .clear          (comp_clear),
    .clear_trig_ack (clear_trig_ack),
    .intr (comp_interrupt), .ready, .readout_enable, .monitor_time, .beam_gate,
    .spill_time, .clear_trig_req
  );

  dead_time_unit #(
    .DEAD_US(DEAD_US), .STROBE_US(STROBE_US), .CF_LEN_US(CF_LEN_US)
  ) u_dead (
    .clk, .rst_n,
    .ready, .beam_gate, .monitor_time,
    .reset_level (!event_active),
    .real_req    (fast_trig_p),
    .mon_req     (mon_req),
    .clear_req   (clear_trig_req),
    .gate        (trig_gate),
    .trigger, .trig_kind,
    .clear_ack   (clear_trig_ack),
    .dead_time, .strobe, .start_pulse, .clearing_field
  );

  monitor_gen #(.PERIOD_US(MON_PERIOD_US)) u_mon (
    .clk, .rst_n,
    .monitor_time, .use_ext (use_ext_gen), .ext_gen (ext_gen_p),
    .trigger, .trig_kind,
    .mon_req, .led_fire, .test_chain
  );

  // HV pulsers fire on real triggers; monitor triggers bring test pulses
  assign hv_fire = trigger && (trig_kind == TRIG_REAL);

  // delay-line write coils: each amplifier-discriminator output passes its
  // gate during STROBE; the START coil of both lines gets START or, for a
  // monitor trigger, the TEST chain
  assign dl_start_write = (trig_kind == TRIG_MONITOR) ? test_chain : start_pulse;
  assign dl_x_write     = strobe ? amp_x : '0;
  assign dl_y_write     = strobe ? amp_y : '0;

  // ---------------- spark-chamber coordinate system ----------------
  logic chain_started, sel;
  logic [N_SPARKS-1:0][SCALER_W-1:0] x_words, y_words;

  regime_ctrl #(.NB(NB)) u_regime (
    .clk, .rst_n,
    .arm (trigger), .event_reset,
    .pulse (px || py),
    .large_jumpers,
    .chain_started, .sel, .regime_change, .burst_idx (), .chain_done, .empty_bursts
  );

  coord_channel u_x (
    .clk, .rst_n, .tick, .pulse (px), .chain_started, .sel, .regime_change,
    .event_reset, .xfer_words (x_words), .fiducial_seen ()
  );
  coord_channel u_y (
    .clk, .rst_n, .tick, .pulse (py), .chain_started, .sel, .regime_change,
    .event_reset, .xfer_words (y_words), .fiducial_seen ()
  );

  // ---------------- counters, latches, chambers, slow data ----------------
  logic acc_reached;
  logic [15:0][SCALER_W-1:0] acc_counts;
  accumulators #(.N_ACC(16)) u_acc (
    .clk, .rst_n, .clr (event_reset),
    .count_gate (beam_gate || monitor_time),
    .mode_after (acc_mode_after),
    .trigger, .freeze (acc_reached),
    .pulses (acc_p), .counts (acc_counts), .counting (acc_counting)
  );

  logic [31:0] latch_q;
  gated_latch #(.N(32), .GATE_NS(20)) u_latch (
    .clk, .rst_n, .clr (event_reset), .trigger,
    .in (latch_in), .q (latch_q), .gate ()
  );

  logic [79:0] prop_q;
  gated_latch #(.N(80), .GATE_NS(PROP_GATE_NS)) u_prop (
    .clk, .rst_n, .clr (event_reset), .trigger,
    .in (prop_in), .q (prop_q), .gate ()
  );

  logic [3:0][WORD_W-1:0] fixed_sw_words;
  fixed_data #(.N_SW(16)) u_fixed (
    .clk, .rst_n, .trigger, .sw (fixed_switches), .bcd (), .words (fixed_sw_words)
  );

  logic [4:0]        dvm_rd_point;
  logic [WORD_W-1:0] dvm_reading;
  logic              dvm_valid;
  dvm_scanner #(.N_POINTS(32), .SETTLE_US(DVM_SETTLE_US)) u_dvm (
    .clk, .rst_n, .accelerator (accel_p),
    .dvm_done, .dvm_value,
    .relay (dvm_relay), .point (), .dvm_trigger,
    .reading (dvm_reading), .reading_point (dvm_rd_point), .reading_valid (dvm_valid)
  );

  // ---------------- group words ----------------
  logic [WPG-1:0][WORD_W-1:0] acc_words, prop_words, fixed_words;
  always_comb begin
    for (int w = 0; w < WPG; w++) acc_words[w] = WORD_W'(acc_counts[w]);

    prop_words = '0;
    for (int w = 0; w < 5; w++) prop_words[w] = prop_q[w*16 +: 16];
    if (trig_kind == TRIG_CLEAR) begin
      prop_words[10] = MAGIC_WORD;
      prop_words[11] = ~MAGIC_WORD;
    end

    fixed_words = '0;
    for (int w = 0; w < 4; w++) fixed_words[w] = fixed_sw_words[w];
    fixed_words[4] = latch_q[15:0];
    fixed_words[5] = latch_q[31:16];
    fixed_words[6] = dvm_reading;
    fixed_words[7] = {dvm_valid, 10'b0, dvm_rd_point};
    for (int w = 0; w < 4; w++) fixed_words[8 + w] = WORD_W'(acc_counts[12 + w]);
  end

  // ---------------- READOUT unit and indicator ----------------
  logic readout, hold;
  readout_unit #(.NB(NB)) u_readout (
    .clk, .rst_n,
    .trigger, .clear (comp_clear), .enable (comp_enable), .regime_change, .hold,
    .x_words, .y_words, .acc_words, .prop_words, .fixed_words,
    .event_active, .data_bus, .flag, .readout, .word_count, .group, .ring (),
    .event_complete, .acc_reached
  );

  word_indicator u_ind (
    .clk, .rst_n, .readout, .word_count, .data_bus,
    .stop_en (ind_stop_en), .stop_word (ind_stop_word), .cont (ind_cont),
    .display (ind_display), .display_word (ind_word), .hold
  );
endmodule
