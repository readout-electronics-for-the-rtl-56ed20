// coord_channel: one coordinate channel (X or Y) of the spark-chamber
// readout, organised "ping-pong".
//
// The channel is split into two identical subchannels (X' and X'', or Y'
// and Y''), each a 6-spark multiple position switch and N_SPARKS scalers of
// 2^W capacity. While one subchannel digitizes the burst coming from the
// delay line, the other holds the counts of the previous burst for
// transfer to the computer. `sel` names the digitizing subchannel (0 = the
// primed one); it is owned by the REGIME circuit and toggles on every
// regime change.
//
// Digitizing: the pulse chain is routed to the switch of subchannel `sel`;
// its outputs gate that subchannel's scalers, which count the 20 MHz clock
// enable `tick`. Scaler i thus ends up holding the number of 20 MHz periods
// between the fiducial and spark i.
// Regime change (one-cycle pulse, sampled with the old `sel`): REGIME RESET
// turns off the switch of the subchannel that has just digitized (its
// scalers stop and are now read), and SCALER RESET clears the scalers of
// the subchannel that has just been read, which digitizes next.
// event_reset (the RESET after an event) clears everything.
// xfer_words presents the scalers of the subchannel in the transfer regime.
module coord_channel
  import readout_pkg::*;
#(
  parameter int unsigned N_SP = N_SPARKS,
  parameter int unsigned W    = SCALER_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,          // 20 MHz count enable
  input  logic                   pulse,         // delay-line pulse chain
  input  logic                   chain_started, // START of the chain seen
  input  logic                   sel,           // digitizing subchannel
  input  logic                   regime_change,
  input  logic                   event_reset,
  output logic [N_SP-1:0][W-1:0] xfer_words,
  output logic [1:0]             fiducial_seen
);
  logic [1:0][N_SP-1:0]         sw_out;
  logic [1:0][N_SP-1:0][W-1:0]  cnt;

  for (genvar p = 0; p < 2; p++) begin : g_sub
    logic sw_reset, sc_reset, sw_en;

    assign sw_reset = event_reset || (regime_change && (sel == p[0]));
    assign sc_reset = event_reset || (regime_change && (sel != p[0]));
    assign sw_en    = chain_started && (sel == p[0]) && !regime_change;

    spark_switch #(.N_OUT(N_SP)) u_switch (
      .clk, .rst_n,
      .regime_reset (sw_reset),
      .enable       (sw_en),
      .pulse        (pulse),
      .out          (sw_out[p]),
      .started      (fiducial_seen[p]),
      .n_sparks     ()
    );

    for (genvar i = 0; i < N_SP; i++) begin : g_sc
      scaler #(.W(W)) u_scaler (
        .clk, .rst_n,
        .clr (sc_reset),
        .inc (tick && sw_out[p][i]),
        .q   (cnt[p][i])
      );
    end
  end

  assign xfer_words = sel ? cnt[0] : cnt[1];
endmodule
