// pulse_sync: brings N asynchronous logic levels into the clock domain
// through two flip-flops and turns each rising edge into a one-cycle pulse.
// Used on the pulse chains from the delay-line read coils and on the inputs
// of the accumulators. Latency: the pulse appears 3 clock edges after the
// input rises. Inputs must stay high and low for at least one clock period.
module pulse_sync #(
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic [N-1:0] rise
);
  logic [N-1:0] s1, s2, s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= in; s2 <= s1; s3 <= s2;
    end
  end
  assign rise = s2 & ~s3;
endmodule
