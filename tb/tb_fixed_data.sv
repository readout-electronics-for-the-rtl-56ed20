// tb_fixed_data: random positions of the sixteen 10-position switches are
// captured as BCD on the trigger and packed four digits per word; a switch
// between positions reads 4'hF; changes between triggers are not seen.
module tb_fixed_data;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [15:0][9:0] sw;
  logic [15:0][3:0] bcd;
  logic [3:0][15:0] words;
  int checks = 0, failures = 0;
  int pos [16];

  fixed_data #(.N_SW(16)) dut (.clk, .rst_n, .trigger, .sw, .bcd, .words);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 30; ev++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        pos[i] = $urandom_range(0, 10);          // 10 = between positions
        sw[i] = (pos[i] == 10) ? 10'b0 : 10'(1) << pos[i];
      end
      trigger = 1;
      @(negedge clk) trigger = 0;
      sw = '1;                                   // later changes must not show
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        logic [3:0] e;
        e = (pos[i] == 10) ? 4'hF : 4'(pos[i]);
        checks++;
        if (bcd[i] !== e || words[i/4][(i%4)*4 +: 4] !== e) begin
          failures++;
          $display("FAIL switch %0d: %h / %h expected %h", i, bcd[i], words[i/4][(i%4)*4 +: 4], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
