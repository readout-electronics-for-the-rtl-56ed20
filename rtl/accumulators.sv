// accumulators: the counting channels of the scintillation and Cerenkov
// counters: N_ACC accumulators of 2^W capacity that count pulses from the
// fast logic at up to the 20 MHz rate.
//
// Each input pulse (one cycle, already synchronised) passes a gate and
// increments its accumulator. The gate is open while the main control's
// count_gate is on and, depending on the operator-selected regime:
//   mode_after = 0  until the TRIGGER (counts what precedes the event)
//   mode_after = 1  from the TRIGGER until freeze (the READOUT unit
//                   reaching the accumulator group), so the counts sent
//                   are stable.
// clr (the RESET after each event) clears the counts and re-opens the
// "until trigger" window. The state is read by each trigger through
// counts. Counts wrap at 2^W.
module accumulators
  import readout_pkg::*;
#(
  parameter int unsigned N_ACC = 16,
  parameter int unsigned W     = SCALER_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    count_gate,
  input  logic                    mode_after,
  input  logic                    trigger,
  input  logic                    freeze,
  input  logic [N_ACC-1:0]        pulses,
  output logic [N_ACC-1:0][W-1:0] counts,
  output logic                    counting
);
  logic triggered;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       triggered <= 1'b0;
    else if (clr)     triggered <= 1'b0;
    else if (trigger) triggered <= 1'b1;
  end

  assign counting = count_gate &&
                    (mode_after ? (triggered && !freeze) : !(triggered || trigger));

  for (genvar i = 0; i < N_ACC; i++) begin : g_acc
    scaler #(.W(W)) u_acc (
      .clk, .rst_n,
      .clr (clr),
      .inc (counting && pulses[i]),
      .q   (counts[i])
    );
  end
endmodule
