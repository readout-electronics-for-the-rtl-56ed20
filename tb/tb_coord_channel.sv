// tb_coord_channel: ping-pong digitizing of several bursts. Each burst is a
// fiducial plus six sparks at random times; the expected scaler values are
// the number of 20 MHz ticks between fiducial and spark, counted by the
// testbench itself. After each regime change the transfer subchannel must
// show the burst just digitized, while the other subchannel digitizes the
// next one.
module tb_coord_channel;
  logic clk = 0, rst_n = 0, tick = 0, pulse = 0, chain_started = 0, sel = 0;
  logic regime_change = 0, event_reset = 0;
  logic [5:0][13:0] xfer_words;
  logic [1:0] fiducial_seen;
  int checks = 0, failures = 0;
  int tick_cnt = 0, tphase = 0;
  int exp_cnt [6];

  coord_channel dut (.clk, .rst_n, .tick, .pulse, .chain_started, .sel,
                     .regime_change, .event_reset, .xfer_words, .fiducial_seen);
  always #5 clk = ~clk;

  // 20 MHz tick: one cycle in five; tick_cnt counts ticks sampled so far
  always @(posedge clk) begin
    if (tick) tick_cnt <= tick_cnt + 1;
  end
  always @(negedge clk) begin
    tphase = (tphase + 1) % 5;
    tick = (tphase == 0);
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic give_pulse();
    @(negedge clk) pulse = 1;
    @(negedge clk) pulse = 0;
  endtask

  task automatic burst(int nsp);
    int t0;
    give_pulse();                 // fiducial, sampled at the posedge after setting
    t0 = tick_cnt;
    for (int i = 0; i < nsp; i++) begin
      repeat ($urandom_range(20, 400)) @(negedge clk);
      give_pulse();
      exp_cnt[i] = tick_cnt - t0;
    end
  endtask

  task automatic change();
    @(negedge clk) regime_change = 1;
    @(negedge clk) regime_change = 0; sel = ~sel;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    chain_started = 1;
    for (int b = 0; b < 6; b++) begin
      int nsp;
      nsp = (b == 3) ? 4 : 6;
      burst(nsp);
      repeat (50) @(negedge clk);
      // unfinished sparks keep counting until the regime change
      for (int i = nsp; i < 6; i++) exp_cnt[i] = -1;
      change();
      @(negedge clk);
      for (int i = 0; i < 6; i++) begin
        if (exp_cnt[i] >= 0) begin
          checks++;
          if (xfer_words[i] !== 14'(exp_cnt[i])) begin
            failures++;
            $display("FAIL burst %0d spark %0d: %0d expected %0d", b, i, xfer_words[i], exp_cnt[i]);
          end
        end else begin
          checks++;
          if (xfer_words[i] <= xfer_words[nsp-1]) begin
            failures++;
            $display("FAIL burst %0d missing spark %0d should exceed last spark", b, i);
          end
        end
      end
      // the subchannel now digitizing was cleared by SCALER RESET
      checks++;
      if (fiducial_seen != 2'b00) begin
        failures++;
        $display("FAIL burst %0d: switches not re-armed %b", b, fiducial_seen);
      end
      // both subchannels are used alternately
      repeat (30) @(negedge clk);
      checks++;
      if (xfer_words[0] !== 14'(exp_cnt[0])) begin
        failures++;
        $display("FAIL burst %0d: transfer words disturbed while idle", b);
      end
    end
    // event reset clears everything
    @(negedge clk) event_reset = 1;
    @(negedge clk) event_reset = 0;
    checks++;
    if (xfer_words !== '0) begin failures++; $display("FAIL event reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
