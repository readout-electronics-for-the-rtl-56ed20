// tick_gen: derives the 20 MHz quartz-clock count enable from the system
// clock. tick is high for one system clock cycle in every DIV cycles
// (DIV = 5 turns the 100 MHz system clock into 20 MHz). Free running from
// reset.
module tick_gen #(
  parameter int unsigned DIV = 5
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  logic [$clog2(DIV)-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (32'(cnt) == DIV - 1);
      cnt  <= (32'(cnt) == DIV - 1) ? '0 : cnt + 1'b1;
    end
  end
endmodule
