// tb_analysis_fb: self-checking test of the polyphase analysis filter bank.
// A random 512-tap window is loaded, then three granules are filtered
// (channel 0, channel 1, channel 0 again, so the per-channel history is
// exercised). Every subband sample is compared with a reference model of
// windowing, folding and matrixing written from the filter-bank equations,
// and the START-to-DONE latency is checked against 18 * 961 cycles.
module tb_analysis_fb;
  import mp3_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, channel = 0;
  addr_t in_addr, sb_addr;
  sample_t in_data, sb_data;
  logic sb_we, sb_channel, done;
  logic coef_we = 0; logic [8:0] coef_addr = 0; coef_t coef_data = 0;

  analysis_fb dut (.*);

  sample_t inbuf [576];
  always_ff @(posedge clk) in_data <= inbuf[in_addr];

  int checks = 0, failures = 0;
  longint win [512];
  longint hist [2][512];      // hist[ch][0] is the newest sample
  longint expS [576];
  longint got  [576];
  int     ngot;

  always @(posedge clk) if (sb_we) begin
    got[sb_addr] = sx24(sb_data);
    ngot++;
  end

  task automatic model(int ch);
    for (int t = 0; t < 18; t++) begin
      longint y [64];
      for (int i = 511; i >= 32; i--) hist[ch][i] = hist[ch][i-32];
      for (int s = 0; s < 32; s++) hist[ch][31-s] = sx24(inbuf[t*32+s]);
      for (int kk = 0; kk < 64; kk++) begin
        longint a = 0;
        for (int jj = 0; jj < 8; jj++) a += win[kk+64*jj] * hist[ch][kk+64*jj];
        y[kk] = rs(a);
      end
      for (int ii = 0; ii < 32; ii++) begin
        longint a = 0;
        for (int kk = 0; kk < 64; kk++)
          a += y[kk] * q($cos(real'((2*ii+1)*(kk-16)) * RPI / 64.0));
        expS[t*32+ii] = rs(a);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) for (int i = 0; i < 512; i++) hist[c][i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      win[i] = longint'($urandom_range(0, 524287)) - 64'sd262144;   // +-0.0625
      @(negedge clk); coef_we = 1; coef_addr = 9'(i); coef_data = coef_t'(win[i]);
    end
    @(negedge clk); coef_we = 0;
    repeat (1100) @(posedge clk);   // history clear
    for (int run = 0; run < 3; run++) begin
      int ch, cyc;
      ch  = (run == 1) ? 1 : 0;
      cyc = 0;
      for (int i = 0; i < 576; i++) inbuf[i] = sample_t'(rnd24());
      model(ch);
      ngot = 0;
      @(negedge clk); start = 1; channel = ch[0];
      @(negedge clk); start = 0;
      while (!done) begin @(posedge clk); cyc++; end
      checks++;
      if (cyc != 18 * 961 + 2) begin
        failures++; $display("latency %0d cycles, expected %0d", cyc, 18*961+2);
      end
      checks++;
      if (ngot != 576 || sb_channel != ch[0]) begin failures++; $display("ngot %0d", ngot); end
      for (int i = 0; i < 576; i++) begin
        checks++;
        if (got[i] != expS[i]) begin
          failures++;
          if (failures < 10) $display("run %0d S[%0d]: got %0d exp %0d", run, i, got[i], expS[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
