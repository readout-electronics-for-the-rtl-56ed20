// tb_accumulators: random pulse trains on all 16 inputs at up to one pulse
// per cycle; reference counts kept by the testbench for both regimes:
// counting until the trigger, and from the trigger until freeze. The
// count gate of the main control must block counting.
module tb_accumulators;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, clr = 0, count_gate = 0, mode_after = 0, trigger = 0, freeze = 0;
  logic [N-1:0] pulses = '0;
  logic [N-1:0][13:0] counts;
  logic counting;
  int checks = 0, failures = 0;
  int unsigned ref_c [N];
  logic ref_open;

  accumulators #(.N_ACC(N)) dut (.clk, .rst_n, .clr, .count_gate, .mode_after, .trigger,
    .freeze, .pulses, .counts, .counting);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (counts[i] !== 14'(ref_c[i])) begin
        failures++;
        $display("FAIL %s acc %0d: %0d expected %0d", what, i, counts[i], ref_c[i] % 16384);
      end
    end
  endtask

  // run n cycles of random pulses; open = whether the gate should count
  task automatic run(int n, bit open_gate);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      pulses = N'($urandom);
      @(posedge clk);
      if (open_gate) for (int i = 0; i < N; i++) if (pulses[i]) ref_c[i]++;
    end
    @(negedge clk) pulses = '0;
  endtask

  task automatic do_clear();
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    foreach (ref_c[i]) ref_c[i] = 0;
  endtask

  initial begin
    foreach (ref_c[i]) ref_c[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // "until trigger" regime
    run(50, 0);                       // gate closed: nothing counts
    compare("gate closed");
    count_gate = 1;
    run(300, 1);
    @(negedge clk) trigger = 1; @(negedge clk) trigger = 0;
    run(200, 0);                      // after the trigger: stopped
    compare("until trigger");
    do_clear();
    compare("clear");
    // "after trigger" regime
    mode_after = 1;
    run(100, 0);
    @(negedge clk) trigger = 1; @(negedge clk) trigger = 0;
    run(400, 1);
    count_gate = 0; run(30, 0); count_gate = 1;
    run(100, 1);
    @(negedge clk) freeze = 1;
    run(100, 0);
    compare("after trigger");
    // wrap at 2^14: one input pulsing for 16384+10 cycles
    do_clear(); freeze = 0; mode_after = 0;
    for (int k = 0; k < 16394; k++) begin
      @(negedge clk) pulses = 16'h0001;
      @(posedge clk) ref_c[0]++;
    end
    @(negedge clk) pulses = '0;
    compare("wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
