// word_indicator: the indicator used to check by eye what is sent to the
// computer.
//
// On every READOUT pulse it captures the word on the DATA BUS and its
// number (the word scaler), for display. With stop_en set, the READOUT of
// word number stop_word sets hold, which keeps the READOUT unit from
// raising FLAG, so the transfer stops at that word with it on the display;
// the operator's cont pulse releases it. hold goes high on the clock edge
// that samples the READOUT pulse, well within the 0.5 us FLAG delay.
module word_indicator
  import readout_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              readout,
  input  logic [WCNT_W-1:0] word_count,
  input  logic [WORD_W-1:0] data_bus,
  input  logic              stop_en,
  input  logic [WCNT_W-1:0] stop_word,
  input  logic              cont,
  output logic [WORD_W-1:0] display,
  output logic [WCNT_W-1:0] display_word,
  output logic              hold
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      display      <= '0;
      display_word <= '0;
      hold         <= 1'b0;
    end else begin
      if (readout) begin
        display      <= data_bus;
        display_word <= word_count;
      end
      if (cont)
        hold <= 1'b0;
      else if (readout && stop_en && word_count == stop_word)
        hold <= 1'b1;
    end
  end
endmodule
