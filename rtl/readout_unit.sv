// readout_unit: the READOUT unit, which transfers one event to the computer
// in a fixed format of EVENT_WORDS (336) 16-bit words.
//
// A word is put on the DATA BUS by the coincidence of a "group" signal
// (CHAMBERS, ACCUMULATORS, PROPORTIONAL CHAMBERS, FIXED DATA) and a "word"
// signal. The group follows from the word scaler (word_count: words 0-299
// chambers, 300-311 accumulators, 312-323 proportional chambers, 324-335
// fixed data); the word signals come from a 12-position one-hot ring
// counter wired in parallel to all groups. In the chamber group ring
// positions 0-5 select the six X scalers and 6-11 the six Y scalers of the
// subchannels in the transfer regime.
//
// Handshake with the computer interface: a READOUT (one-cycle pulse) puts a
// word on the bus; FLAG is raised FLAG_NS (0.5 us) later; the computer
// stores the word and answers with an ENABLE pulse, which drops FLAG,
// advances the ring counter and the word scaler and starts the next
// READOUT. While hold is set (word indicator stop) FLAG is not raised.
// Chamber words go in blocks of 12, each started by a regime change; the
// three remaining groups follow the last chamber block without a pause.
// After the last word the unit waits for the computer's CLEAR pulse, which
// ends the event (event_active low = the RESET level is on again).
// The TRIGGER starts an event. Default sizes follow the document.
module readout_unit
  import readout_pkg::*;
#(
  parameter int unsigned NB      = N_BURSTS,
  parameter int unsigned FLAG_NS = 500,
  parameter int unsigned MHZ     = CLK_MHZ
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            trigger,
  input  logic                            clear,
  input  logic                            enable,
  input  logic                            regime_change,
  input  logic                            hold,
  input  logic [N_SPARKS-1:0][SCALER_W-1:0] x_words,
  input  logic [N_SPARKS-1:0][SCALER_W-1:0] y_words,
  input  logic [WORDS_PER_GRP-1:0][WORD_W-1:0] acc_words,
  input  logic [WORDS_PER_GRP-1:0][WORD_W-1:0] prop_words,
  input  logic [WORDS_PER_GRP-1:0][WORD_W-1:0] fixed_words,
  output logic                            event_active,
  output logic [WORD_W-1:0]               data_bus,
  output logic                            flag,
  output logic                            readout,
  output logic [WCNT_W-1:0]               word_count,
  output group_e                          group,
  output logic [WORDS_PER_GRP-1:0]        ring,
  output logic                            event_complete,
  output logic                            acc_reached
);
  localparam int unsigned WPG    = WORDS_PER_GRP;
  localparam int unsigned CHW    = NB * WPG;
  localparam int unsigned TOTAL  = CHW + 3 * WPG;
  localparam int unsigned FL_CYC = ns2cyc(FLAG_NS, MHZ);
  localparam int unsigned DW     = $clog2(FL_CYC + 1);

  typedef enum logic [2:0] {R_IDLE, R_WAIT_REGIME, R_DELAY, R_FLAG, R_DONE} rstate_e;
  rstate_e state;
  logic [DW-1:0] dly;
  logic          on_bus;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= R_IDLE;
      event_active <= 1'b0;
      word_count   <= '0;
      ring         <= WPG'(1);
      flag         <= 1'b0;
      readout      <= 1'b0;
      dly          <= '0;
    end else begin
      readout <= 1'b0;
      if (clear) begin
        state        <= R_IDLE;
        event_active <= 1'b0;
        flag         <= 1'b0;
      end else begin
        unique case (state)
          R_IDLE: if (trigger) begin
                    event_active <= 1'b1;
                    word_count   <= '0;
                    ring         <= WPG'(1);
                    state        <= R_WAIT_REGIME;
                  end
          R_WAIT_REGIME: if (regime_change) begin
                    readout <= 1'b1;
                    dly     <= DW'(FL_CYC - 1);
                    state   <= R_DELAY;
                  end
          R_DELAY: if (dly != 0) dly <= dly - 1'b1;
                   else if (!hold) begin
                     flag  <= 1'b1;
                     state <= R_FLAG;
                   end
          R_FLAG: if (enable) begin
                    flag       <= 1'b0;
                    word_count <= word_count + 1'b1;
                    ring       <= {ring[WPG-2:0], ring[WPG-1]};
                    if (word_count == WCNT_W'(TOTAL - 1)) begin
                      state <= R_DONE;
                    end else if (ring[WPG-1] && word_count < WCNT_W'(CHW - 1)) begin
                      state <= R_WAIT_REGIME;
                    end else begin
                      readout <= 1'b1;
                      dly     <= DW'(FL_CYC - 1);
                      state   <= R_DELAY;
                    end
                  end
          R_DONE: ;
          default: state <= R_IDLE;
        endcase
      end
    end
  end

  assign on_bus         = (state == R_DELAY) || (state == R_FLAG);
  assign event_complete = (state == R_DONE);
  assign acc_reached    = event_active && (word_count >= WCNT_W'(CHW));

  always_comb begin
    if (!on_bus)                              group = GRP_NONE;
    else if (word_count < WCNT_W'(CHW))       group = GRP_CHAMBERS;
    else if (word_count < WCNT_W'(CHW + WPG)) group = GRP_ACCUM;
    else if (word_count < WCNT_W'(CHW + 2*WPG)) group = GRP_PROP;
    else                                      group = GRP_FIXED;
  end

  // DATA BUS: OR of all words whose group and word signals coincide
  always_comb begin
    data_bus = '0;
    for (int w = 0; w < WPG; w++) begin
      if (ring[w]) begin
        unique case (group)
          GRP_CHAMBERS: data_bus |= (w < N_SPARKS) ? WORD_W'(x_words[w % N_SPARKS])
                                                   : WORD_W'(y_words[w % N_SPARKS]);
          GRP_ACCUM:    data_bus |= acc_words[w];
          GRP_PROP:     data_bus |= prop_words[w];
          GRP_FIXED:    data_bus |= fixed_words[w];
          default:      ;
        endcase
      end
    end
  end

  // the ring counter always holds exactly one word signal
  a_ring_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot(ring));
  // a chamber block must be transferred before the next regime change
  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n)
    (regime_change && event_active && word_count < WCNT_W'(CHW)) |-> state == R_WAIT_REGIME);
endmodule
