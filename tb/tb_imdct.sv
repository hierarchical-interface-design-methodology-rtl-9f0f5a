// tb_imdct: self-checking test of the IMDCT. Five granules with different
// block types (normal, short mixed, start, stop, short), channels and maxb
// are transformed; a reference written from the IMDCT, window, overlap-add
// and frequency-inversion formulas predicts all 576 outputs of each, and the
// start-to-done time is checked against the per-subband cycle budget.
module tb_imdct;
  import mp3_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  dec_param_t param = '0;
  addr_t in_addr, out_addr;
  sample_t in_data, out_data;
  logic out_we, out_channel, done;

  imdct dut (.*);

  longint inp [576];
  always_ff @(posedge clk) in_data <= sample_t'(inp[in_addr % 576]);

  int checks = 0, failures = 0, nout;
  longint got [576], expd [576];
  longint ov [2][576];
  always @(posedge clk) if (out_we) begin
    got[32'(out_addr[9:5]) * 18 + 32'(out_addr[4:0])] = sx24(out_data); nout++;
  end

  function automatic real wlong(int bt, int i);
    real s36 = $sin(RPI / 36.0 * (real'(i) + 0.5));
    if (bt == 1) begin
      if (i >= 18 && i < 24) return 1.0;
      if (i >= 24 && i < 30) return $sin(RPI / 12.0 * (real'(i) - 18.0 + 0.5));
      if (i >= 30) return 0.0;
    end
    if (bt == 3) begin
      if (i < 6) return 0.0;
      if (i < 12) return $sin(RPI / 12.0 * (real'(i) - 6.0 + 0.5));
      if (i < 18) return 1.0;
    end
    return s36;
  endfunction

  function automatic longint sat(longint v);
    if (v > 8388607) return 8388607;
    if (v < -8388608) return -8388608;
    return v;
  endfunction

  // returns expected cycle count
  function automatic int model(int ch, int maxb, int bt, int mix);
    int cyc = 0;
    for (int s = 0; s < 32; s++) begin
      longint zz [36];
      bit sh = (bt == 2) && !(mix && s < 2);
      for (int i = 0; i < 36; i++) zz[i] = 0;
      if (s > maxb) cyc += 19;
      else if (!sh) begin
        int b = (bt == 2) ? 0 : bt;
        cyc += 19 + 324 + 18;
        for (int i = 0; i < 36; i++) begin
          longint a = 0;
          for (int k = 0; k < 18; k++)
            a += inp[s*18+k] * q($cos(RPI / 72.0 * real'((2*i + 19) * (2*k + 1))));
          zz[i] = rs(rs(a) * q(wlong(b, i)));
        end
      end else begin
        cyc += 19 + 108 + 18;
        for (int w = 0; w < 3; w++)
          for (int i = 0; i < 12; i++) begin
            longint a = 0;
            for (int k = 0; k < 6; k++)
              a += inp[s*18 + 3*k + w] * q($cos(RPI / 24.0 * real'((2*i + 7) * (2*k + 1))));
            zz[6 + 6*w + i] = sat(zz[6 + 6*w + i] + rs(rs(a) * q($sin(RPI / 12.0 * (real'(i) + 0.5)))));
          end
      end
      for (int i = 0; i < 18; i++) begin
        longint y = sat(zz[i] + ov[ch][s*18+i]);
        if ((s % 2 == 1) && (i % 2 == 1)) y = sat(-y);
        expd[s*18+i] = y;
        ov[ch][s*18+i] = zz[i+18];
      end
    end
    return cyc;
  endfunction

  int runs_ch [5]   = '{0, 1, 0, 0, 1};
  int runs_maxb [5] = '{31, 20, 10, 31, 31};
  int runs_bt [5]   = '{0, 2, 1, 3, 2};
  int runs_mix [5]  = '{0, 1, 0, 0, 0};

  initial begin
    for (int c = 0; c < 2; c++) for (int i = 0; i < 576; i++) ov[c][i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (1200) @(posedge clk);
    for (int run = 0; run < 5; run++) begin
      int cyc, ecyc;
      for (int i = 0; i < 576; i++) inp[i] = rnd24();
      ecyc = model(runs_ch[run], runs_maxb[run], runs_bt[run], runs_mix[run]);
      nout = 0; cyc = 0;
      @(negedge clk);
      start = 1;
      param = '{channel: runs_ch[run][0], maxb: 5'(runs_maxb[run]),
                block_type: block_type_e'(runs_bt[run]), mix_block_flag: runs_mix[run][0]};
      @(negedge clk); start = 0;
      while (!done) begin @(posedge clk); cyc++; end
      checks++;
      if (cyc != ecyc + 2) begin failures++; $display("run %0d latency %0d exp %0d", run, cyc, ecyc + 2); end
      checks++;
      if (nout != 576 || out_channel != runs_ch[run][0]) begin failures++; $display("nout %0d", nout); end
      for (int i = 0; i < 576; i++) begin
        checks++;
        if (got[i] != expd[i]) begin
          failures++;
          if (failures < 10) $display("run %0d y[%0d]: got %0d exp %0d", run, i, got[i], expd[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
