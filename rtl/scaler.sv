// scaler: a binary counter of 2^W capacity, the basic counting element of
// the coordinate system (each spark scaler counts the 20 MHz quartz clock
// while its gate from the multiple position switch is open) and of the
// accumulators (each counts pulses from the fast logic).
//
// inc   - count one in this cycle (gate AND clock enable, formed outside)
// clr   - synchronous clear, wins over inc
// q     - current count; it wraps from 2^W-1 to 0, as a plain binary scaler
//         of that capacity would (wrapping rather than saturating is this
//         design's choice).
// Timing: q changes on the clock edge that samples inc or clr.
module scaler #(
  parameter int unsigned W = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (inc) q <= q + 1'b1;
  end
endmodule
