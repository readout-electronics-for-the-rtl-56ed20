// spark_switch: the multiple position ("6 SPARK") switch of one coordinate
// subchannel.
//
// The first pulse of a burst (the FIDUCIAL) switches all N_OUT outputs
// high; each following pulse turns off the next output, lowest first, so
// output i is high from the fiducial until spark i. The outputs gate the
// spark scalers, whose counts are therefore the fiducial-to-spark times.
// Pulses beyond the N_OUT-th spark are ignored. REGIME RESET (regime_reset)
// turns every output off and re-arms the switch for the next fiducial;
// outputs of sparks that never came stay high until then.
//
// pulse   - one-cycle pulse from the delay-line read coil
// enable  - the subchannel is in the digitizing regime and the pulse chain
//           has started (START seen); pulses are ignored otherwise
// started - the fiducial of the current burst has been seen
// n_sparks- number of sparks seen in this burst (0..N_OUT)
// Timing: outputs change on the edge that samples the pulse.
module spark_switch #(
  parameter int unsigned N_OUT = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       regime_reset,
  input  logic                       enable,
  input  logic                       pulse,
  output logic [N_OUT-1:0]           out,
  output logic                       started,
  output logic [$clog2(N_OUT+1)-1:0] n_sparks
);
  localparam logic [N_OUT-1:0] ONES = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out      <= '0;
      started  <= 1'b0;
      n_sparks <= '0;
    end else if (regime_reset) begin
      out      <= '0;
      started  <= 1'b0;
      n_sparks <= '0;
    end else if (enable && pulse) begin
      if (!started) begin
        out     <= '1;
        started <= 1'b1;
      end else if (32'(n_sparks) < N_OUT) begin
        out[n_sparks] <= 1'b0;
        n_sparks      <= n_sparks + 1'b1;
      end
    end
  end

  // switch opens outputs in order: a high output never lies below a low one
  // once started (outputs 0..n_sparks-1 low, the rest high)
  a_order : assert property (@(posedge clk) disable iff (!rst_n)
    started |-> (out == (ONES << n_sparks)));
endmodule
