// tb_clk_sel: self-checking test of the IP clock selection. The system
// clock (period 10) and the external clock (period 14) run freely; the test
// counts rising edges of the IP clock over a fixed window for each control
// word: system clock, external clock, and disabled, and checks that no
// pulse is shorter than the selected clock's high phase.
module tb_clk_sel;
  logic sys_clk = 0, ext_clk = 0, rst_n = 0;
  logic [1:0] control_word = 2'b10;
  logic gclk;
  always #5 sys_clk = ~sys_clk;
  always #7 ext_clk = ~ext_clk;

  clk_sel dut (.*);

  int checks = 0, failures = 0, edges = 0;
  realtime rise_t = 0, min_high = 1e9;
  always @(posedge gclk) begin edges++; rise_t = $realtime; end
  always @(negedge gclk) if ($realtime - rise_t < min_high) min_high = $realtime - rise_t;

  task automatic window(string what, int lo, int hi, real minh);
    edges = 0; min_high = 1e9;
    #1400;
    checks++;
    if (edges < lo || edges > hi) begin failures++; $display("%s: %0d edges", what, edges); end
    checks++;
    if (edges > 0 && min_high < minh) begin failures++; $display("%s: short pulse %0t", what, min_high); end
  endtask

  initial begin
    #23 rst_n = 1;
    #100;
    window("system clock", 139, 141, 5.0);
    control_word = 2'b00; #100;          // disable before switching
    window("disabled", 0, 0, 0.0);
    control_word = 2'b01; #100;
    window("external, disabled", 0, 0, 0.0);
    control_word = 2'b11; #100;
    window("external clock", 99, 101, 7.0);
    control_word = 2'b01; #100;
    control_word = 2'b00; #100;
    control_word = 2'b10; #100;
    window("system clock again", 139, 141, 5.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
