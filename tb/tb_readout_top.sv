// tb_readout_top: end-to-end run of the readout electronics through one
// accelerator cycle, with shortened control times (monitor time, beam gate,
// spill-end and readout-reset delays) and all sizes at their defaults.
//
// The testbench plays the surroundings of the design:
//  - the accelerator timing pulse;
//  - a behavioural model of the two magnetostrictive delay lines: a pulse
//    written at write coil k appears at the read coil d_coil[k] cycles
//    later (START coil: d_start), the coil positions spacing the bursts
//    80 us (small chamber) or 160 us (large chamber) apart;
//  - the spark chambers: after each real trigger every pick-up coil gives
//    a fiducial and a random number of sparks (0 to 7) at random times,
//    except one small chamber (SILENT) that gives no pulse at all, so the
//    REGIME circuit must time its burst out;
//  - fast electronics, counters, latches, proportional chambers, a DVM;
//  - the computer: ENABLE after the INTERRUPT, one ENABLE per FLAG after a
//    3 us store time, CLEAR after 336 words and ENABLE again to restore
//    READY.
// Every word of the first real event is checked against values computed
// here (spark times in 20 MHz periods, pulse counts, latched patterns,
// switch settings, DVM reading); the monitor event must carry the test
// chain's known times and the CLEAR TRIGGER event the magic words. Each
// mechanism of the design is counted and must occur at least once.
module tb_readout_top;
  import readout_pkg::*;
  localparam int NB        = 25;
  localparam int INT_D     = 100;
  localparam int MON_LEN   = 4000;
  localparam int MON_PER   = 1000;
  localparam int BEAM_DLY  = 1000;
  localparam int BEAM_LEN  = 8000;
  localparam int SED       = 2000;
  localparam int RRD       = 4000;
  localparam int BEAM_T0   = INT_D + MON_LEN + BEAM_DLY;   // us after ACCELERATOR
  localparam int TRIG1_T   = BEAM_T0 + 500;
  localparam int TRIG2_T   = BEAM_T0 + 3900;
  localparam int TRIG3_T   = BEAM_T0 + BEAM_LEN - 50;
  localparam int END_T     = BEAM_T0 + BEAM_LEN + SED + RRD + 6000;
  localparam int WATCHDOG_US = END_T + 20000;

  logic clk = 0, rst_n = 0;
  logic accelerator = 0, fast_trigger = 0, ext_monitor_gen = 0;
  logic comp_enable = 0, comp_clear = 0;
  logic use_ext_gen = 0, acc_mode_after = 0;
  logic [NB-1:0] large_jumpers;
  logic [15:0][9:0] fixed_switches;
  logic ind_stop_en = 0, ind_cont = 0;
  logic [8:0] ind_stop_word = 9'd100;
  logic [NB-1:0] amp_x = '0, amp_y = '0;
  logic dl_x_read, dl_y_read;
  logic [15:0] acc_in = '0;
  logic [31:0] latch_in = '0;
  logic [79:0] prop_in = '0;
  logic dvm_done = 0;
  logic [15:0] dvm_value = 0;

  logic comp_interrupt, spill_time, flag;
  logic [15:0] data_bus, ind_display;
  logic [8:0] ind_word, word_count;
  logic hv_fire, clearing_field, dl_start_write, led_fire, dvm_trigger;
  logic [NB-1:0] dl_x_write, dl_y_write;
  logic [31:0] dvm_relay;
  logic ready, readout_enable, monitor_time, beam_gate, trig_gate, trigger, dead_time, strobe;
  logic event_active, acc_counting, event_complete, regime_change, chain_done;
  trig_kind_e trig_kind;
  group_e group;
  logic [4:0] empty_bursts;

  readout_top #(
    .INT_DELAY_US(INT_D), .MON_LEN_US(MON_LEN), .MON_PERIOD_US(MON_PER),
    .BEAM_DELAY_US(BEAM_DLY), .BEAM_LEN_US(BEAM_LEN),
    .SPILL_END_DELAY_US(SED), .READOUT_RESET_DELAY_US(RRD)
  ) dut (.*);

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #(longint'(WATCHDOG_US) * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- delay-line model ----------------
  int unsigned d_start;
  int unsigned d_coil [NB];
  int unsigned burst_us [NB];
  int x_hi = 0, y_hi = 0;
  assign dl_x_read = (x_hi > 0);
  assign dl_y_read = (y_hi > 0);
  task automatic play(bit is_y, int unsigned d);
    repeat (d) @(posedge clk);
    if (is_y) y_hi++; else x_hi++;
    repeat (3) @(posedge clk);
    if (is_y) y_hi--; else x_hi--;
  endtask
  always @(posedge clk) if (rst_n) begin
    if (dl_start_write) begin
      fork play(0, d_start); play(1, d_start); join_none
    end
    for (int k = 0; k < NB; k++) begin
      if (dl_x_write[k]) begin automatic int unsigned d = d_coil[k]; fork play(0, d); join_none end
      if (dl_y_write[k]) begin automatic int unsigned d = d_coil[k]; fork play(1, d); join_none end
    end
  end

  // ---------------- spark chambers ----------------
  localparam int FID_CYC = 200;            // fiducial 2 us after the trigger
  int exp_w [2][NB][6];                    // expected 20 MHz counts, -1 = missing spark
  int n_more_than_6 = 0, n_missing = 0;
  task automatic coil_burst(bit is_y, int k, int nsp, int len_cyc);
    int t [8];
    int prev;
    prev = 0;
    for (int i = 0; i < nsp; i++) begin
      t[i] = prev + $urandom_range(100, (len_cyc - 100 * (8 - i) - prev) > 100 ?
                                         (len_cyc - 100 * (8 - i) - prev) : 100);
      prev = t[i];
    end
    for (int i = 0; i < 6; i++) exp_w[is_y][k][i] = (i < nsp) ? t[i] / 5 : -1;
    repeat (FID_CYC) @(negedge clk);
    if (is_y) amp_y[k] = 1; else amp_x[k] = 1;
    @(negedge clk);
    if (is_y) amp_y[k] = 0; else amp_x[k] = 0;
    prev = 0;
    for (int i = 0; i < nsp; i++) begin
      repeat (t[i] - prev - 1) @(negedge clk);
      if (is_y) amp_y[k] = 1; else amp_x[k] = 1;
      @(negedge clk);
      if (is_y) amp_y[k] = 0; else amp_x[k] = 0;
      prev = t[i];
    end
  endtask
  localparam int SILENT = 5;               // a small chamber that gives no pulse at all
  task automatic chamber_event();
    for (int k = 0; k < NB; k++) begin
      if (k == SILENT) begin
        for (int i = 0; i < 6; i++) begin exp_w[0][k][i] = -2; exp_w[1][k][i] = -2; end
        continue;
      end
      for (int ax = 0; ax < 2; ax++) begin
        automatic int kk = k;
        automatic bit yy = ax[0];
        automatic int r = $urandom_range(0, 9);
        automatic int nsp = (r == 0) ? 7 : (r == 1) ? $urandom_range(0, 5) : 6;
        automatic int len = (large_jumpers[k] ? 130 : 60) * 100;
        if (nsp > 6) n_more_than_6++;
        if (nsp < 6) n_missing++;
        fork coil_burst(yy, kk, nsp, len); join_none
      end
    end
  endtask

  // ---------------- triggers, latches, proportional chambers ----------------
  trig_kind_e kinds [$];
  int n_real = 0, n_mon = 0, n_clear = 0, n_trig = 0, n_hv = 0, n_led = 0;
  logic [31:0] lat_pat;
  logic [79:0] prop_pat;
  always @(negedge clk) if (rst_n && trigger) begin
    n_trig++;
    kinds.push_back(trig_kind);
    if (trig_kind == TRIG_REAL) begin
      n_real++;
      if (n_real == 1) chamber_event();
      fork begin
        latch_in = lat_pat; prop_in = prop_pat;
        repeat (2) @(negedge clk); latch_in = '0;
        repeat (8) @(negedge clk); prop_in = '0;
        repeat (5) @(negedge clk); latch_in = ~lat_pat; prop_in = ~prop_pat;
        repeat (3) @(negedge clk); latch_in = '0; prop_in = '0;
      end join_none
    end
    if (trig_kind == TRIG_MONITOR) n_mon++;
    if (trig_kind == TRIG_CLEAR) n_clear++;
  end
  always @(negedge clk) begin
    if (hv_fire) n_hv++;
    if (led_fire) n_led++;
  end

  // ---------------- DVM model ----------------
  always @(negedge clk) if (dvm_trigger) begin
    repeat (100) @(negedge clk);
    for (int i = 0; i < 32; i++) if (dvm_relay[i]) dvm_value = 16'(16'h1200 + i);
    dvm_done = 1; @(negedge clk) dvm_done = 0;
  end

  // ---------------- mechanisms seen ----------------
  int n_sel0 = 0, n_sel1 = 0, n_chg_small = 0, n_chg_large = 0, n_clr_wait = 0;
  int n_blocked = 0, n_hold = 0, n_ready_restore = 0, n_cf = 0;
  logic cf_q = 0;
  // margin between each regime change of the first real event and the next
  // pulse at a read coil: the change must fall in the gap between bursts
  bit  in_real1 = 0, chg_pending = 0, rd_q = 0;
  longint t_chg = 0, min_gap = 1000000;
  always @(negedge clk) begin
    if (rst_n && trigger && trig_kind == TRIG_REAL && n_real == 1) in_real1 = 1;
    if (event_complete) in_real1 = 0;
    if (in_real1 && regime_change) begin chg_pending = 1; t_chg = cyc; end
    if (in_real1 && chg_pending && (dl_x_read || dl_y_read) && !rd_q) begin
      if (cyc - t_chg < min_gap) min_gap = cyc - t_chg;
      chg_pending = 0;
    end
    rd_q = dl_x_read || dl_y_read;
  end
  // empty bursts of the first real event, taken when its last word is sent
  int max_empty_real = -1;
  always @(negedge clk)
    if (rst_n && event_complete && n_real == 1 && kinds[$] == TRIG_REAL && max_empty_real < 0)
      max_empty_real = int'(empty_bursts);
  always @(negedge clk) begin
    if (regime_change) begin
      if (dut.sel) n_sel1++; else n_sel0++;
    end
    if (dut.clear_trig_req && event_active) n_clr_wait++;
    if (clearing_field && !cf_q) n_cf++;
    cf_q = clearing_field;
  end

  // ---------------- computer model ----------------
  logic [15:0] ev [$];
  int n_events = 0, n_real_read = 0, n_full_checked = 0;
  longint blk_start = 0;
  int max_blk_cyc = 0;
  task automatic pulse_enable();
    @(negedge clk) comp_enable = 1; @(negedge clk) comp_enable = 0;
  endtask
  task automatic check_event(trig_kind_e k);
    check(ev.size() == 336, $sformatf("event has %0d words", ev.size()));
    if (ev.size() != 336) return;
    if (k == TRIG_CLEAR) begin
      check(ev[322] == MAGIC_WORD && ev[323] == ~MAGIC_WORD, "magic words in CLEAR TRIGGER event");
      for (int w = 0; w < 300; w++) check(ev[w] == 0, $sformatf("clear event chamber word %0d", w));
    end else begin
      check(ev[322] == 0 && ev[323] == 0, "no magic words");
    end
    if (k == TRIG_MONITOR) begin
      for (int ax = 0; ax < 2; ax++)
        for (int i = 0; i < 6; i++) begin
          int v, e;
          v = ev[ax * 6 + i]; e = 160 * (i + 1);
          check(v >= e - 1 && v <= e + 1, $sformatf("test chain spark %0d: %0d expected %0d", i, v, e));
        end
      for (int w = 12; w < 300; w++) check(ev[w] == 0, $sformatf("monitor event word %0d", w));
    end
    if (k == TRIG_REAL) n_real_read++;
    if (k == TRIG_REAL && n_real_read == 1) begin
      n_full_checked++;
      for (int b = 0; b < NB; b++)
        for (int ax = 0; ax < 2; ax++)
          for (int i = 0; i < 6; i++) begin
            int v, e;
            v = ev[b * 12 + ax * 6 + i];
            e = exp_w[ax][b][i];
            if (e == -2) e = 0;                                   // silent coil: switch never started
            else if (e < 0) e = (large_jumpers[b] ? 150 : 70) * 20;   // counts until the regime change
            check(v >= e - 1 && v <= e + 1,
                  $sformatf("burst %0d %s spark %0d: %0d expected %0d", b, ax ? "Y" : "X", i, v, e));
          end
      for (int a = 0; a < 16; a++) begin
        int w;
        w = (a < 12) ? 300 + a : 332 + (a - 12);
        check(ev[w] == 16'(acc_exp[a]), $sformatf("accumulator %0d: %0d expected %0d", a, ev[w], acc_exp[a]));
      end
      for (int w = 0; w < 5; w++) check(ev[312 + w] == prop_pat[w*16 +: 16], $sformatf("prop word %0d", w));
      for (int w = 0; w < 4; w++) begin
        logic [15:0] e;
        for (int d = 0; d < 4; d++) e[d*4 +: 4] = 4'(sw_pos[w*4 + d]);
        check(ev[324 + w] == e, $sformatf("fixed data word %0d", w));
      end
      check({ev[329], ev[328]} == lat_pat, "latch words");
      check(ev[330] == 16'h1200 && ev[331] == 16'h8000, "DVM reading of point 0");
    end
  endtask

  initial begin
    forever begin
      @(negedge clk);
      if (comp_interrupt) begin
        repeat (50) @(negedge clk);
        pulse_enable();
      end else if (flag) begin
        if (ev.size() % 12 == 0 && ev.size() < 300) blk_start = cyc;
        ev.push_back(data_bus);
        if (ev.size() % 12 == 0 && ev.size() <= 300)
          if (cyc - blk_start > max_blk_cyc) max_blk_cyc = int'(cyc - blk_start);
        repeat (300) @(negedge clk);
        pulse_enable();
        if (ev.size() == 336) begin
          trig_kind_e k;
          repeat (10) @(negedge clk);
          check(event_complete && !flag, "event complete after 336 words");
          k = kinds.pop_front();
          n_events++;
          check_event(k);
          ev.delete();
          repeat (100) @(negedge clk);
          comp_clear = 1; @(negedge clk) comp_clear = 0;
          @(negedge clk);
          check(!ready && !event_active, "CLEAR resets READY and the event");
          repeat (500) @(negedge clk);
          if (readout_enable) begin
            pulse_enable();
            if (ready) n_ready_restore++;
          end
        end
      end
    end
  end

  // word indicator: stop at word 100 of the second real event
  initial begin
    wait (n_real == 2);
    ind_stop_en = 1;
    wait (ind_word == 9'd100 && dut.hold);
    repeat (2000) @(negedge clk);
    check(!flag && dut.hold, "transfer stopped at selected word");
    n_hold++;
    @(negedge clk) ind_cont = 1; @(negedge clk) ind_cont = 0;
    ind_stop_en = 0;
    wait (flag);
    @(negedge clk);
    check(ind_display == data_bus, "indicator shows the stopped word");
  end

  // ---------------- accumulator inputs and fast triggers ----------------
  int acc_exp [16];
  int sw_pos [16];
  task automatic acc_burst(int n_cyc);
    for (int c = 0; c < n_cyc; c += 4) begin
      logic [15:0] p;
      p = 16'($urandom);
      @(negedge clk) acc_in = p;
      for (int a = 0; a < 16; a++) if (p[a]) acc_exp[a]++;
      repeat (2) @(negedge clk);
      acc_in = '0;
      @(negedge clk);
    end
  endtask
  task automatic fast_trig();
    @(negedge clk) fast_trigger = 1;
    repeat (3) @(negedge clk);
    fast_trigger = 0;
  endtask
  task automatic wait_us(int us);
    repeat (us * 100) @(negedge clk);
  endtask

  longint t0;
  initial begin
    int trig_before;
    for (int k = 0; k < NB; k++) large_jumpers[k] = (k >= 19);
    d_start = 1000;
    begin
      int s;
      s = 0;
      for (int k = 0; k < NB; k++) begin
        d_coil[k] = d_start + 400 - FID_CYC + s * 100;
        s += large_jumpers[k] ? 160 : 80;
      end
    end
    foreach (acc_exp[a]) acc_exp[a] = 0;
    for (int i = 0; i < 16; i++) begin
      sw_pos[i] = $urandom_range(0, 9);
      fixed_switches[i] = 10'(1) << sw_pos[i];
    end
    lat_pat = $urandom; prop_pat = {$urandom, $urandom, $urandom};
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    accelerator = 1; repeat (3) @(negedge clk); accelerator = 0;
    t0 = cyc;
    // beam: accumulator pulses, then three real triggers and one blocked
    wait (cyc >= t0 + longint'(BEAM_T0 + 50) * 100);
    check(beam_gate, "beam gate on");
    acc_burst((TRIG1_T - BEAM_T0 - 100) * 100);
    wait (cyc >= t0 + longint'(TRIG1_T) * 100);
    fast_trig();
    wait_us(20);
    trig_before = n_trig;
    check(!trig_gate, "GATE closed during the event");
    fast_trig();
    wait_us(5);
    if (n_trig == trig_before) n_blocked++;
    wait (cyc >= t0 + longint'(TRIG2_T) * 100);
    fast_trig();
    wait (cyc >= t0 + longint'(TRIG3_T) * 100);
    fast_trig();
    wait (cyc >= t0 + longint'(END_T) * 100);
    check(!readout_enable && !ready, "system disabled until the next spill");
    // mechanisms
    check(n_mon >= 1, "monitor trigger");
    check(n_real == 3, $sformatf("%0d real triggers, expected 3", n_real));
    check(n_clear == 1, "one CLEAR TRIGGER");
    check(n_events == n_trig, $sformatf("%0d events read of %0d triggers", n_events, n_trig));
    check(n_hv == n_real && n_led == n_mon, "HV pulsers and light diodes");
    check(n_blocked >= 1, "trigger blocked by the gate");
    check(n_clr_wait >= 1, "CLEAR TRIGGER waiting for the event in progress");
    check(n_sel0 > 0 && n_sel1 > 0, "both ping-pong subchannels digitized");
    check(n_more_than_6 > 0 && n_missing > 0, "coils with more than six and fewer than six sparks");
    check(n_hold == 1, "indicator stop");
    check(n_full_checked == 1, "first real event checked word by word");
    check(n_ready_restore >= 1, "READY restored by ENABLE");
    check(n_cf >= 1, "clearing field");
    check(min_gap >= 500, $sformatf("regime change %0d cycles before the next burst", min_gap));
    check(max_empty_real == 1, $sformatf("empty burst of the silent coil timed out (%0d)", max_empty_real));
    check(max_blk_cyc > 0 && max_blk_cyc < 7000, $sformatf("12-word block took %0d cycles", max_blk_cyc));
    $display("events %0d (real %0d, monitor %0d, clear %0d); blocked %0d; 12-word block %0d us",
             n_events, n_real, n_mon, n_clear, n_blocked, max_blk_cyc / 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
