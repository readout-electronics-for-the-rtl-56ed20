// tb_regime_ctrl: after a trigger and START, bursts arrive for small and
// large chambers (jumper pattern); each regime change must come exactly
// 70 us or 150 us (7000 / 15000 cycles at 100 MHz) after the first pulse
// of its burst, sel must toggle, a missing burst must be timed out, and
// the chain must end after NB bursts.
module tb_regime_ctrl;
  localparam int NB = 5;
  logic clk = 0, rst_n = 0, arm = 0, event_reset = 0, pulse = 0;
  logic [NB-1:0] large_jumpers = 5'b01010;
  logic chain_started, sel, regime_change, chain_done;
  logic [2:0] burst_idx, empty_bursts;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint first_pulse_cyc;
  longint last_change_cyc = 0;
  int n_changes = 0;
  logic exp_sel = 0;

  regime_ctrl #(.NB(NB)) dut (.clk, .rst_n, .arm, .event_reset, .pulse, .large_jumpers,
    .chain_started, .sel, .regime_change, .burst_idx, .chain_done, .empty_bursts);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic give_pulse();
    @(negedge clk) pulse = 1;
    @(negedge clk) pulse = 0;
  endtask

  // measure each regime change against the first pulse of its burst
  always @(negedge clk) if (rst_n && regime_change) begin
    longint expd;
    expd = large_jumpers[n_changes] ? 15000 : 7000;
    checks++;
    if (cyc - first_pulse_cyc != expd) begin
      failures++;
      $display("FAIL change %0d after %0d cycles, expected %0d", n_changes, cyc - first_pulse_cyc, expd);
    end
    n_changes++;
    last_change_cyc = cyc;
    exp_sel = ~exp_sel;
    @(negedge clk);
    checks++;
    if (sel !== exp_sel) begin failures++; $display("FAIL sel not toggled"); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) arm = 1;
    @(negedge clk) arm = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (chain_started) begin failures++; $display("FAIL started before START"); end
    give_pulse();                                 // START
    checks++;
    if (!chain_started) begin failures++; $display("FAIL START not seen"); end
    repeat (400) @(negedge clk);                  // 4 us lead
    for (int b = 0; b < NB; b++) begin
      if (b == 2) begin
        // burst 2 is empty: timed as if it had begun GAP_US = 10 us after
        // the previous change, so its change comes 80 us after that one
        first_pulse_cyc = last_change_cyc + 1000 - 1;
        wait (regime_change); @(negedge clk);
        repeat (500) @(negedge clk);
      end else begin
        @(negedge clk) pulse = 1;
        first_pulse_cyc = cyc;
        @(negedge clk) pulse = 0;
        for (int k = 0; k < 6; k++) begin
          repeat ($urandom_range(100, 900)) @(negedge clk);
          give_pulse();
        end
        wait (regime_change); @(negedge clk);
        repeat (1000) @(negedge clk);             // gap before next burst
      end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_changes != NB || !chain_done || empty_bursts != 1) begin
      failures++;
      $display("FAIL end: changes=%0d done=%b empty=%0d", n_changes, chain_done, empty_bursts);
    end
    // pulses after the chain is done change nothing
    give_pulse();
    repeat (20000) @(negedge clk);
    checks++;
    if (n_changes != NB) begin failures++; $display("FAIL change after done"); end
    @(negedge clk) event_reset = 1;
    @(negedge clk) event_reset = 0;
    checks++;
    if (chain_done || chain_started || sel || burst_idx != 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
