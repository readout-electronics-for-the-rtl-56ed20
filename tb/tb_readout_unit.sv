// tb_readout_unit: one full 336-word event. A computer model answers each
// FLAG with an ENABLE after a random time and records the DATA BUS. The
// testbench provides fresh X/Y scaler values before each of the 25 regime
// changes and checks every word against the fixed format, the 0.5 us
// (50-cycle) FLAG delay after each READOUT, the pause after each chamber
// block until the next regime change, the hold input, the group signals,
// and the end of the event by CLEAR.
module tb_readout_unit;
  import readout_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0, clear = 0, enable = 0, regime_change = 0, hold = 0;
  logic [5:0][13:0] x_words, y_words;
  logic [11:0][15:0] acc_words, prop_words, fixed_words;
  logic event_active, flag, readout, event_complete, acc_reached;
  logic [15:0] data_bus;
  logic [8:0] word_count;
  group_e group;
  logic [11:0] ring;
  int checks = 0, failures = 0;
  longint cyc = 0, t_readout = 0;
  logic [15:0] got [$];
  logic [15:0] expd [$];
  int n_blocks_waited = 0, n_hold = 0;

  readout_unit dut (.clk, .rst_n, .trigger, .clear, .enable, .regime_change, .hold,
    .x_words, .y_words, .acc_words, .prop_words, .fixed_words, .event_active, .data_bus,
    .flag, .readout, .word_count, .group, .ring, .event_complete, .acc_reached);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FLAG delay and group check
  logic flag_q = 0;
  int n_flags = 0;
  always @(negedge clk) begin
    if (readout) t_readout = cyc;
    if (flag && !flag_q) begin
      group_e eg;
      int w;
      w = n_flags;
      n_flags++;
      eg = (w < 300) ? GRP_CHAMBERS : (w < 312) ? GRP_ACCUM : (w < 324) ? GRP_PROP : GRP_FIXED;
      checks++;
      if (cyc - t_readout != (hold_seen ? cyc - t_readout : 50)) begin
        failures++; $display("FAIL flag delay %0d at word %0d", cyc - t_readout, w);
      end
      checks++;
      if (group !== eg || word_count !== 9'(w) || ring !== 12'(1) << (w % 12)) begin
        failures++; $display("FAIL word %0d: group %0d count %0d ring %b", w, group, word_count, ring);
      end
    end
    flag_q = flag;
  end
  logic hold_seen = 0;

  // computer model: stores the word and answers with ENABLE
  initial begin
    forever begin
      @(negedge clk);
      if (flag) begin
        got.push_back(data_bus);
        repeat ($urandom_range(5, 60)) @(negedge clk);
        enable = 1; @(negedge clk) enable = 0;
        hold_seen = 0;
      end
    end
  end

  initial begin
    for (int i = 0; i < 12; i++) begin
      acc_words[i] = 16'($urandom); prop_words[i] = 16'($urandom); fixed_words[i] = 16'($urandom);
    end
    x_words = '0; y_words = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) trigger = 1; @(negedge clk) trigger = 0;
    checks++; if (!event_active) begin failures++; $display("FAIL event not active"); end
    for (int b = 0; b < 25; b++) begin
      repeat (200) @(negedge clk);
      // no flag while waiting for the regime change
      checks++;
      if (flag || group != GRP_NONE) begin failures++; $display("FAIL flag before regime change %0d", b); end
      else n_blocks_waited++;
      for (int i = 0; i < 6; i++) begin
        x_words[i] = 14'($urandom); y_words[i] = 14'($urandom);
      end
      for (int i = 0; i < 6; i++) expd.push_back(16'(x_words[i]));
      for (int i = 0; i < 6; i++) expd.push_back(16'(y_words[i]));
      if (b == 7) begin hold = 1; hold_seen = 1; end
      @(negedge clk) regime_change = 1; @(negedge clk) regime_change = 0;
      if (b == 7) begin
        repeat (500) @(negedge clk);
        checks++;
        if (flag) begin failures++; $display("FAIL flag during hold"); end else n_hold++;
        hold = 0;
      end
      wait (got.size() == (b + 1) * 12);
    end
    for (int i = 0; i < 12; i++) expd.push_back(acc_words[i]);
    for (int i = 0; i < 12; i++) expd.push_back(prop_words[i]);
    for (int i = 0; i < 12; i++) expd.push_back(fixed_words[i]);
    wait (event_complete);
    repeat (100) @(negedge clk);
    checks++;
    if (got.size() != 336 || flag) begin failures++; $display("FAIL %0d words", got.size()); end
    for (int i = 0; i < 336 && i < got.size(); i++) begin
      checks++;
      if (got[i] !== expd[i]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: %h expected %h", i, got[i], expd[i]);
      end
    end
    checks++; if (!event_active || !acc_reached) begin failures++; $display("FAIL active before clear"); end
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    checks++; if (event_active || event_complete) begin failures++; $display("FAIL clear"); end
    checks++; if (n_blocks_waited != 25 || n_hold != 1) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
