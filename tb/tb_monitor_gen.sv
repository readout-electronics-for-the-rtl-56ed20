// tb_monitor_gen: with MHZ = 1 checks the internal generator period inside
// MONITOR TIME only, the external generator mode, and the test chain that
// follows an accepted monitor trigger: START, fiducial START_LEAD later,
// then N_TEST pulses SPACING apart, with one LED pulse.
module tb_monitor_gen;
  import readout_pkg::*;
  localparam int PER = 50, LEAD = 4, SP = 8, NT = 6;
  logic clk = 0, rst_n = 0, monitor_time = 0, use_ext = 0, ext_gen = 0, trigger = 0;
  trig_kind_e trig_kind = TRIG_REAL;
  logic mon_req, led_fire, test_chain;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint req_t[$];
  longint chain_t[$];
  int n_led = 0;

  monitor_gen #(.MHZ(1), .PERIOD_US(PER), .START_LEAD_US(LEAD), .SPACING_US(SP), .N_TEST(NT)) dut (
    .clk, .rst_n, .monitor_time, .use_ext, .ext_gen, .trigger, .trig_kind,
    .mon_req, .led_fire, .test_chain);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (mon_req) req_t.push_back(cyc);
    if (test_chain) chain_t.push_back(cyc);
    if (led_fire) n_led++;
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
    repeat (200) @(negedge clk);
    checks++; if (req_t.size() != 0) begin failures++; $display("FAIL request outside monitor time"); end
    monitor_time = 1;
    repeat (PER * 4 + 10) @(negedge clk);
    monitor_time = 0;
    checks++;
    if (req_t.size() != 5) begin failures++; $display("FAIL %0d requests", req_t.size()); end
    for (int i = 1; i < req_t.size(); i++) begin
      checks++;
      if (req_t[i] - req_t[i-1] != PER) begin failures++; $display("FAIL period %0d", req_t[i] - req_t[i-1]); end
    end
    // external generator
    req_t.delete();
    use_ext = 1; monitor_time = 1;
    repeat (3) begin
      repeat (17) @(negedge clk);
      ext_gen = 1; @(negedge clk) ext_gen = 0;
    end
    repeat (5) @(negedge clk);
    checks++; if (req_t.size() != 3) begin failures++; $display("FAIL ext %0d", req_t.size()); end
    // a real trigger gives no chain
    @(negedge clk) trigger = 1; @(negedge clk) trigger = 0;
    repeat (100) @(negedge clk);
    checks++; if (chain_t.size() != 0 || n_led != 0) begin failures++; $display("FAIL chain on real trigger"); end
    // monitor trigger
    @(negedge clk) begin trigger = 1; trig_kind = TRIG_MONITOR; end
    @(negedge clk) trigger = 0;
    repeat (LEAD + SP * NT + 20) @(negedge clk);
    checks++;
    if (chain_t.size() != NT + 2 || n_led != 1) begin
      failures++; $display("FAIL chain length %0d led %0d", chain_t.size(), n_led);
    end else begin
      checks++;
      if (chain_t[1] - chain_t[0] != LEAD) begin failures++; $display("FAIL lead %0d", chain_t[1] - chain_t[0]); end
      for (int i = 2; i < chain_t.size(); i++) begin
        checks++;
        if (chain_t[i] - chain_t[i-1] != SP) begin failures++; $display("FAIL spacing"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
