// tb_prop_memory: 80 proportional-chamber channels with the 100 ns gate (10 cycles at
// 100 MHz). Wire pulses inside the gate after the trigger are stored, pulses
// before or after it are not, and the RESET clears the memory.
module tb_prop_memory;
  localparam int N = 80, GATE_NS = 100, GC = 10;
  logic clk = 0, rst_n = 0, clr = 0, trigger = 0;
  logic [N-1:0] in = '0, q;
  logic gate;
  int checks = 0, failures = 0;

  gated_latch #(.N(N), .GATE_NS(GATE_NS)) dut (.clk, .rst_n, .clr, .trigger, .in, .q, .gate);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] expected;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 20; ev++) begin
      logic [N-1:0] pre_v, mid_v [GC], post_v;
      pre_v = N'({$urandom, $urandom, $urandom}); post_v = N'({$urandom, $urandom, $urandom});
      expected = '0;
      @(negedge clk) in = pre_v;
      @(negedge clk) begin in = pre_v; trigger = 1; end
      @(negedge clk) trigger = 0;
      for (int k = 0; k < GC; k++) begin
        mid_v[k] = N'({$urandom, $urandom, $urandom});
        in = mid_v[k];
        expected |= mid_v[k];
        @(negedge clk);
      end
      in = post_v;
      repeat (5) @(negedge clk);
      in = '0;
      checks++;
      if (q !== expected) begin failures++; $display("FAIL event %0d: %h expected %h", ev, q, expected); end
      @(negedge clk) clr = 1; @(negedge clk) clr = 0;
      checks++;
      if (q !== '0) begin failures++; $display("FAIL clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
