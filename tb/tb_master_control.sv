// tb_master_control: with MHZ = 1 (one cycle per microsecond) checks the
// accelerator-cycle sequence: INTERRUPT after INT_DELAY, MONITOR TIME,
// BEAM GATE, SPILL TIME extended by SPILL END DELAY, CLEAR TRIGGER request
// held until acknowledged, READOUT ENABLE ending READOUT RESET DELAY after
// that; READY set by ENABLE and cleared by CLEAR and by the end of READOUT
// ENABLE; accelerator pulses during the sequence ignored.
module tb_master_control;
  localparam int INT_D = 10, MON = 40, BDLY = 20, BEAM = 100, SED = 30, RRD = 25;
  localparam int B = INT_D + 1;
  logic clk = 0, rst_n = 0, accelerator = 0, enable = 0, clear = 0, clear_trig_ack = 0;
  logic intr, ready, readout_enable, monitor_time, beam_gate, spill_time, clear_trig_req;
  int checks = 0, failures = 0;
  longint cyc = 0;

  master_control #(.MHZ(1), .INT_DELAY_US(INT_D), .MON_LEN_US(MON), .BEAM_DELAY_US(BDLY),
    .BEAM_LEN_US(BEAM), .SPILL_END_DELAY_US(SED), .READOUT_RESET_DELAY_US(RRD)) dut (
    .clk, .rst_n, .accelerator, .enable, .clear, .clear_trig_ack,
    .intr, .ready, .readout_enable, .monitor_time, .beam_gate, .spill_time, .clear_trig_req);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected level of each output, cycle by cycle, relative to the
  // accelerator pulse: written from the sequence, not from the RTL
  longint t_acc;
  longint t_ack;
  logic ack_given = 0;
  always @(negedge clk) if (rst_n && t_acc > 0) begin
    longint r;
    logic e_int, e_mon, e_beam, e_spill, e_req, e_roe;
    r = cyc - t_acc;                        // 0 = cycle of the accelerator pulse
    // B: cycle of the INTERRUPT; the MONITOR TIME starts with it
    e_int   = (r == INT_D + 1);
    e_mon   = (r >= B) && (r < B + MON);
    e_beam  = (r >= B + MON + BDLY) && (r < B + MON + BDLY + BEAM);
    e_spill = (r >= B + MON + BDLY) && (r < B + MON + BDLY + BEAM + SED);
    e_req   = (r >= B + MON + BDLY + BEAM + SED) && (!ack_given || cyc <= t_ack);
    e_roe   = (r >= B) && (!ack_given || cyc <= t_ack + RRD);
    checks++;
    if ({intr, monitor_time, beam_gate, spill_time, clear_trig_req, readout_enable} !==
        {e_int, e_mon, e_beam, e_spill, e_req, e_roe}) begin
      failures++;
      if (failures < 10)
        $display("FAIL r=%0d got %b%b%b%b%b%b expected %b%b%b%b%b%b", r, intr, monitor_time,
                 beam_gate, spill_time, clear_trig_req, readout_enable,
                 e_int, e_mon, e_beam, e_spill, e_req, e_roe);
    end
  end

  task automatic pulse_enable();
    @(negedge clk) enable = 1; @(negedge clk) enable = 0;
  endtask

  initial begin
    t_acc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pulse_enable();
    checks++; if (ready) begin failures++; $display("FAIL ready outside readout enable"); end
    @(negedge clk) begin accelerator = 1; t_acc = cyc; end
    @(negedge clk) accelerator = 0;
    wait (intr); @(negedge clk);
    pulse_enable();
    checks++; if (!ready) begin failures++; $display("FAIL ready not set"); end
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    checks++; if (ready) begin failures++; $display("FAIL ready not cleared by CLEAR"); end
    pulse_enable();
    // a second accelerator pulse during the sequence is ignored
    @(negedge clk) accelerator = 1; @(negedge clk) accelerator = 0;
    wait (clear_trig_req);
    repeat (7) @(negedge clk);                // request held while busy
    clear_trig_ack = 1; t_ack = cyc; ack_given = 1;
    @(negedge clk) clear_trig_ack = 0;
    wait (!readout_enable); @(negedge clk); @(negedge clk);
    checks++; if (ready) begin failures++; $display("FAIL ready after readout enable"); end
    repeat (20) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
