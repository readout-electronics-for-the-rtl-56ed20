// tb_scaler: random inc / clr sequence against a reference count, then a
// full 2^14 run to check the wrap of the 14-bit scaler.
module tb_scaler;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [13:0] q;
  int checks = 0, failures = 0;
  int unsigned ref_q = 0;

  scaler #(.W(14)) dut (.clk, .rst_n, .clr, .inc, .q);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what);
    checks++;
    if (q !== 14'(ref_q)) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, ref_q & 16'h3fff);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); chk("after reset");
    for (int i = 0; i < 2000; i++) begin
      clr = ($urandom_range(0, 99) == 0);
      inc = $urandom_range(0, 1);
      @(posedge clk); #1;
      if (clr) ref_q = 0; else if (inc) ref_q = (ref_q + 1) % 16384;
      chk("random");
    end
    clr = 1; @(posedge clk); #1; clr = 0; ref_q = 0;
    inc = 1;
    for (int i = 0; i < 16384 + 5; i++) begin
      @(posedge clk); #1;
      ref_q = (ref_q + 1) % 16384;
    end
    inc = 0;
    chk("wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
