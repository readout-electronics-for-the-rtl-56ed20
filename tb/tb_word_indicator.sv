// tb_word_indicator: the display follows each READOUT; with the stop set
// at a word number, hold rises when that word is read and stays until the
// continue pulse; other words do not stop.
module tb_word_indicator;
  logic clk = 0, rst_n = 0, readout = 0, stop_en = 0, cont = 0;
  logic [8:0] word_count = 0, stop_word = 9'd17, display_word;
  logic [15:0] data_bus = 0, display;
  logic hold;
  int checks = 0, failures = 0;

  word_indicator dut (.clk, .rst_n, .readout, .word_count, .data_bus, .stop_en, .stop_word,
    .cont, .display, .display_word, .hold);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      stop_en = (pass == 1);
      for (int w = 0; w < 40; w++) begin
        logic [15:0] d;
        d = 16'($urandom);
        @(negedge clk) begin word_count = 9'(w); data_bus = d; readout = 1; end
        @(negedge clk) begin readout = 0; data_bus = 16'hFFFF; end
        checks++;
        if (display !== d || display_word !== 9'(w)) begin failures++; $display("FAIL display word %0d", w); end
        checks++;
        if (hold !== (stop_en && w == 17)) begin failures++; $display("FAIL hold at word %0d: %b", w, hold); end
        if (hold) begin
          repeat (10) @(negedge clk);
          checks++;
          if (!hold) begin failures++; $display("FAIL hold released early"); end
          @(negedge clk) cont = 1; @(negedge clk) cont = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
