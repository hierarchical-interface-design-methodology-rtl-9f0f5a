// tb_synthesis_fb: self-checking test of the polyphase synthesis filter
// bank. A random 512-tap window is loaded and three granules (channel 0, 1,
// 0) are synthesised; every PCM sample is compared with a reference that
// keeps its own shifting V vector per channel and applies the matrixing and
// windowing equations, and the latency is checked against 18 * 961 cycles.
module tb_synthesis_fb;
  import mp3_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, channel = 0;
  addr_t in_addr, out_addr;
  sample_t in_data, out_data;
  logic out_we, done;
  logic coef_we = 0; logic [8:0] coef_addr = 0; coef_t coef_data = 0;

  synthesis_fb dut (.*);

  longint inp [576];
  always_ff @(posedge clk) in_data <= sample_t'(inp[in_addr % 576]);

  int checks = 0, failures = 0, nout;
  longint got [576], expd [576];
  longint win [512];
  longint v [2][1024];
  always @(posedge clk) if (out_we) begin got[out_addr % 576] = sx24(out_data); nout++; end

  task automatic model(int ch);
    for (int t = 0; t < 18; t++) begin
      for (int i = 1023; i >= 64; i--) v[ch][i] = v[ch][i-64];
      for (int i = 0; i < 64; i++) begin
        longint a = 0;
        for (int k = 0; k < 32; k++)
          a += inp[t*32+k] * q($cos(real'((16 + i) * (2*k + 1)) * RPI / 64.0));
        v[ch][i] = rs(a);
      end
      for (int j = 0; j < 32; j++) begin
        longint a = 0;
        for (int m = 0; m < 8; m++) begin
          a += win[j + 64*m]      * v[ch][128*m + j];
          a += win[j + 64*m + 32] * v[ch][128*m + 96 + j];
        end
        expd[t*32+j] = rs(a);
      end
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) for (int i = 0; i < 1024; i++) v[c][i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      win[i] = longint'($urandom_range(0, 8388607)) - 64'sd4194304;   // +-1.0
      @(negedge clk); coef_we = 1; coef_addr = 9'(i); coef_data = coef_t'(win[i]);
    end
    @(negedge clk); coef_we = 0;
    repeat (2100) @(posedge clk);
    for (int run = 0; run < 3; run++) begin
      int ch, cyc;
      ch = (run == 1) ? 1 : 0;
      for (int i = 0; i < 576; i++) inp[i] = rnd24() / 32;
      model(ch);
      nout = 0; cyc = 0;
      @(negedge clk); start = 1; channel = ch[0];
      @(negedge clk); start = 0;
      while (!done) begin @(posedge clk); cyc++; end
      checks++;
      if (cyc != 18 * 961 + 2) begin failures++; $display("latency %0d", cyc); end
      checks++;
      if (nout != 576) begin failures++; $display("nout %0d", nout); end
      for (int i = 0; i < 576; i++) begin
        checks++;
        if (got[i] != expd[i]) begin
          failures++;
          if (failures < 10) $display("run %0d pcm[%0d]: got %0d exp %0d", run, i, got[i], expd[i]);
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
