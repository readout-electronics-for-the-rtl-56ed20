// fixed_data: the FIXED DATA circuit that marks the regime of the set-up.
//
// N_SW ten-position switches each close one of ten contacts
// (sw[i][d] = 1 when switch i stands at position d). Each is encoded to
// one BCD digit; a switch with no contact closed (between positions) reads
// as 4'hF, and with several closed the lowest position wins. The digits
// are captured on every TRIGGER so an event carries one consistent
// setting, and packed four digits per 16-bit word, switch 0 in the low
// nibble of word 0.
module fixed_data
  import readout_pkg::*;
#(
  parameter int unsigned N_SW = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       trigger,
  input  logic [N_SW-1:0][9:0]       sw,
  output logic [N_SW-1:0][3:0]       bcd,
  output logic [(N_SW+3)/4-1:0][WORD_W-1:0] words
);
  function automatic logic [3:0] enc10(logic [9:0] c);
    for (int d = 0; d < 10; d++)
      if (c[d]) return 4'(d);
    return 4'hF;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bcd <= '0;
    else if (trigger)
      for (int i = 0; i < N_SW; i++) bcd[i] <= enc10(sw[i]);
  end

  always_comb begin
    words = '0;
    for (int i = 0; i < N_SW; i++) words[i/4][(i%4)*4 +: 4] = bcd[i];
  end
endmodule
