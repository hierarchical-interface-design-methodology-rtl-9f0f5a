// tb_dec_if2: self-checking test of the decoder's interface 2. Two granules
// are written in IMDCT order (32 packets of 18) and read back in filter-bank
// order (18 packets of 32); every word, the passed channel and the start
// pulse are checked.
module tb_dec_if2;
  import mp3_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t imdct_addr = 0, sb_addr = 0;
  sample_t imdct_data = 0, sb_data;
  logic imdct_we = 0, imdct_channel = 0, imdct_done = 0, sb_channel, sb_start;

  dec_if2 dut (.*);

  int checks = 0, failures = 0, started;
  longint g [32][18];
  always @(posedge clk) if (sb_start) started++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      started = 0;
      for (int s = 0; s < 32; s++)
        for (int i = 0; i < 18; i++) begin
          g[s][i] = rnd24();
          @(negedge clk); imdct_we = 1; imdct_addr = addr_t'({s[4:0], i[4:0]});
          imdct_data = sample_t'(g[s][i]); imdct_channel = run[0];
        end
      @(negedge clk); imdct_we = 0; imdct_done = 1;
      @(negedge clk); imdct_done = 0;
      @(negedge clk);
      checks++;
      if (started != 1 || sb_channel != run[0]) begin failures++; $display("start/channel"); end
      for (int t = 0; t < 18; t++)
        for (int s = 0; s < 32; s++) begin
          @(negedge clk); sb_addr = addr_t'({t[4:0], s[4:0]});
          @(negedge clk);
          checks++;
          if (sx24(sb_data) != g[s][t]) begin
            failures++;
            if (failures < 10) $display("t %0d sb %0d: got %0d exp %0d", t, s, sx24(sb_data), g[s][t]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
