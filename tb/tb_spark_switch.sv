// tb_spark_switch: fiducial opens all six outputs, each spark closes the
// next one, pulses while disabled and a seventh spark are ignored, REGIME
// RESET re-arms the switch.
module tb_spark_switch;
  logic clk = 0, rst_n = 0, regime_reset = 0, enable = 0, pulse = 0;
  logic [5:0] out;
  logic started;
  logic [2:0] n_sparks;
  int checks = 0, failures = 0;

  spark_switch #(.N_OUT(6)) dut (.clk, .rst_n, .regime_reset, .enable, .pulse,
                                 .out, .started, .n_sparks);
  always #5 clk = ~clk;

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [5:0] exp_out, logic exp_st, int exp_n, string what);
    checks++;
    if (out !== exp_out || started !== exp_st || n_sparks !== 3'(exp_n)) begin
      failures++;
      $display("FAIL %s: out=%b started=%b n=%0d, expected %b %b %0d",
               what, out, started, n_sparks, exp_out, exp_st, exp_n);
    end
  endtask

  task automatic give_pulse();
    @(negedge clk) pulse = 1;
    @(negedge clk) pulse = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) chk(6'b0, 0, 0, "reset");
    give_pulse(); chk(6'b0, 0, 0, "disabled pulse ignored");
    enable = 1;
    for (int rep = 0; rep < 2; rep++) begin
      give_pulse(); chk(6'b111111, 1, 0, "fiducial");
      for (int k = 1; k <= 7; k++) begin
        repeat ($urandom_range(0, 4)) @(negedge clk);
        give_pulse();
        chk(6'(6'b111111 << (k > 6 ? 6 : k)), 1, k > 6 ? 6 : k, "spark");
      end
      @(negedge clk) regime_reset = 1;
      @(negedge clk) regime_reset = 0;
      chk(6'b0, 0, 0, "regime reset");
    end
    // partial burst: 3 sparks, then regime reset while outputs still high
    give_pulse(); give_pulse(); give_pulse(); give_pulse();
    chk(6'b111000, 1, 3, "three sparks");
    enable = 0; give_pulse(); chk(6'b111000, 1, 3, "disabled mid burst");
    @(negedge clk) regime_reset = 1;
    @(negedge clk) regime_reset = 0;
    chk(6'b0, 0, 0, "reset partial");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
