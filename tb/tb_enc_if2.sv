// tb_enc_if2: self-checking test of the encoder's interface 2. Three
// granules are written in filter-bank order (channel 0, channel 1, channel 0)
// and after each sb_done every one of the 32x36 MDCT addresses is read back:
// the first 18 words of a subband must be the previous granule of the same
// channel (zero at first), the last 18 the granule just written.
module tb_enc_if2;
  import mp3_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t sb_addr = 0, mdct_addr = 0;
  sample_t sb_data = 0, mdct_data;
  logic sb_we = 0, sb_channel = 0, sb_done = 0, mdct_channel, mdct_start;

  enc_if2 dut (.*);

  int checks = 0, failures = 0;
  longint gran [3][576];         // [run][t*32+sb]
  int     started;

  always @(posedge clk) if (mdct_start) started++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2400) @(posedge clk);
    for (int run = 0; run < 3; run++) begin
      int ch, prev;
      ch = (run == 1) ? 1 : 0;
      prev = (run == 2) ? 0 : -1;
      started = 0;
      for (int i = 0; i < 576; i++) begin
        gran[run][i] = rnd24();
        @(negedge clk); sb_we = 1; sb_addr = addr_t'(i); sb_data = sample_t'(gran[run][i]);
        sb_channel = ch[0];
      end
      @(negedge clk); sb_we = 0; sb_done = 1;
      @(negedge clk); sb_done = 0;
      @(negedge clk);
      checks++;
      if (started != 1 || mdct_channel != ch[0]) begin failures++; $display("start/channel wrong"); end
      for (int s = 0; s < 32; s++)
        for (int n = 0; n < 36; n++) begin
          longint e;
          @(negedge clk); mdct_addr = addr_t'({s[4:0], n[5:0]});
          @(negedge clk);
          if (n < 18) e = (prev < 0) ? 0 : gran[prev][n*32+s];
          else        e = gran[run][(n-18)*32+s];
          checks++;
          if (sx24(mdct_data) != e) begin
            failures++;
            if (failures < 10) $display("run %0d sb %0d n %0d: got %0d exp %0d", run, s, n, sx24(mdct_data), e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
