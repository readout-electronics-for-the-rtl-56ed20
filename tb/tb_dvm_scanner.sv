// tb_dvm_scanner: with MHZ = 1 and a 20-cycle settling time, 70
// accelerator cycles step the 32 test points round (wrapping), close one
// relay at a time, trigger the DVM exactly once per cycle after the
// settling time, and latch the reading of a simple DVM model with its
// point number.
module tb_dvm_scanner;
  localparam int SETTLE = 20;
  logic clk = 0, rst_n = 0, accelerator = 0, dvm_done = 0;
  logic [15:0] dvm_value = 0;
  logic [31:0] relay;
  logic [4:0] point, reading_point;
  logic dvm_trigger, reading_valid;
  logic [15:0] reading;
  int checks = 0, failures = 0;
  longint cyc = 0, t_acc = 0;
  int n_trig = 0;

  dvm_scanner #(.N_POINTS(32), .SETTLE_US(SETTLE), .MHZ(1)) dut (
    .clk, .rst_n, .accelerator, .dvm_done, .dvm_value, .relay, .point, .dvm_trigger,
    .reading, .reading_point, .reading_valid);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // DVM model: reads the voltage of the closed relay 5 cycles after its trigger
  function automatic logic [15:0] volts(logic [31:0] r);
    for (int i = 0; i < 32; i++) if (r[i]) return 16'(1000 + 37 * i);
    return 16'hDEAD;
  endfunction
  always @(negedge clk) if (dvm_trigger) begin
    n_trig++;
    checks++;
    if (cyc - t_acc != SETTLE + 1) begin failures++; $display("FAIL settle %0d", cyc - t_acc); end
    repeat (5) @(negedge clk);
    dvm_value = volts(relay); dvm_done = 1;
    @(negedge clk) dvm_done = 0;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 70; c++) begin
      @(negedge clk) begin accelerator = 1; t_acc = cyc; end
      @(negedge clk) accelerator = 0;
      repeat (SETTLE + 20) @(negedge clk);
      checks++;
      if (relay !== 32'(1) << (c % 32) || point !== 5'(c % 32)) begin
        failures++; $display("FAIL cycle %0d relay %h point %0d", c, relay, point);
      end
      checks++;
      if (!reading_valid || reading_point !== 5'(c % 32) || reading !== 16'(1000 + 37 * (c % 32))) begin
        failures++; $display("FAIL cycle %0d reading %0d point %0d", c, reading, reading_point);
      end
    end
    checks++;
    if (n_trig != 70) begin failures++; $display("FAIL %0d DVM triggers", n_trig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
