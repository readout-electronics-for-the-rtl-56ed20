// gated_latch: an N-channel gated flip-flop memory. It serves as the
// latches of the scintillation and Cerenkov counters (20 ns gate) and as
// the 80-channel memory of the proportional chambers (gate of chosen
// length, typically 100 ns).
//
// The TRIGGER opens the gate for GATE_NS, rounded up to whole clock
// cycles, starting in the cycle after the trigger. Every input that is
// high while the gate is open sets its flip-flop; the flip-flops hold
// until clr (the RESET after the event). Inputs are the shaped logic
// pulses (50 ns wide from the proportional-chamber shapers), sampled by the
// system clock. q is the stored pattern that is sent to the computer.
module gated_latch
  import readout_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned GATE_NS = 20,
  parameter int unsigned MHZ     = CLK_MHZ
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         trigger,
  input  logic [N-1:0] in,
  output logic [N-1:0] q,
  output logic         gate
);
  localparam int unsigned GATE_CYC = ns2cyc(GATE_NS, MHZ);
  localparam int unsigned GW = $clog2(GATE_CYC + 1);

  logic [GW-1:0] gcnt;
  assign gate = (gcnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gcnt <= '0;
      q    <= '0;
    end else begin
      if (trigger)        gcnt <= GW'(GATE_CYC);
      else if (gcnt != 0) gcnt <= gcnt - 1'b1;

      if (clr)       q <= '0;
      else if (gate) q <= q | in;
    end
  end
endmodule
