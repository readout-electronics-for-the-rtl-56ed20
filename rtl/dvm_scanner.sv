// dvm_scanner: the scanner of the voltage measuring system.
//
// It works with the accelerator cycle: on each ACCELERATOR pulse it steps
// to the next of N_POINTS test points (wrapping), closes that point's relay
// (one-hot relay output), waits SETTLE_US for the relay contacts and then
// triggers the digital voltmeter exactly once. When the DVM reports done,
// its reading and the point number are latched; that state is sent to the
// computer with every event. The settling time and the 16-bit reading are
// this design's choices.
module dvm_scanner
  import readout_pkg::*;
#(
  parameter int unsigned N_POINTS  = 32,
  parameter int unsigned SETTLE_US = 5000,
  parameter int unsigned MHZ       = CLK_MHZ
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        accelerator,
  input  logic                        dvm_done,
  input  logic [WORD_W-1:0]           dvm_value,
  output logic [N_POINTS-1:0]         relay,
  output logic [$clog2(N_POINTS)-1:0] point,
  output logic                        dvm_trigger,
  output logic [WORD_W-1:0]           reading,
  output logic [$clog2(N_POINTS)-1:0] reading_point,
  output logic                        reading_valid
);
  localparam int unsigned SET_CYC = us2cyc(SETTLE_US, MHZ);
  localparam int unsigned TW = $clog2(SET_CYC + 1);

  logic [TW-1:0] settle;
  logic          settling, stepped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      point         <= '0;
      stepped       <= 1'b0;
      settle        <= '0;
      settling      <= 1'b0;
      dvm_trigger   <= 1'b0;
      reading       <= '0;
      reading_point <= '0;
      reading_valid <= 1'b0;
    end else begin
      dvm_trigger <= 1'b0;
      if (accelerator) begin
        // first cycle after reset measures point 0
        point    <= !stepped ? '0 :
                    (32'(point) == N_POINTS - 1) ? '0 : point + 1'b1;
        stepped  <= 1'b1;
        settle   <= TW'(SET_CYC - 1);
        settling <= 1'b1;
      end else if (settling) begin
        if (settle == 0) begin
          settling    <= 1'b0;
          dvm_trigger <= 1'b1;
        end else begin
          settle <= settle - 1'b1;
        end
      end
      if (dvm_done) begin
        reading       <= dvm_value;
        reading_point <= point;
        reading_valid <= 1'b1;
      end
    end
  end

  always_comb begin
    relay = '0;
    relay[point] = stepped;
  end
endmodule
