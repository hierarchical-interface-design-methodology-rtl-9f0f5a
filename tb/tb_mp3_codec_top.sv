// tb_mp3_codec_top: end-to-end test of the MP3 codec hardware at its
// default sizes. Two host threads run at the same time:
//  * encoder, on the system clock: loads a window table, encodes three
//    granules (channel 0, 1, 0) through the PVCI port, writing each next
//    granule into the free buffer half while the present one is processed,
//    and gates the encoder clock off for a while in the middle;
//  * decoder, switched to the external clock: loads a window table and
//    decodes five granules with normal, short (mixed and not), start and
//    stop blocks and several maxb values.
// Every output word is compared with the bit-exact reference of
// tb_mp3_model. Each mechanism of the design is counted and must occur.
// The longest granule of each IP is checked against the real-time budget
// of a 48 kHz stereo stream at a 20 MHz IP clock.
module tb_mp3_codec_top;
  import mp3_pkg::*;
  import tb_ref_pkg::*;
  import tb_mp3_model::*;

  logic sys_clk = 0, ext_clk = 0, rst_n = 0;
  always #5 sys_clk = ~sys_clk;
  always #7 ext_clk = ~ext_clk;

  logic [1:0] enc_control_word = 2'b10, dec_control_word = 2'b10;
  logic enc_clk, dec_clk;
  pvci_req_t enc_req = '0, dec_req = '0;
  pvci_rsp_t enc_rsp, dec_rsp;

  mp3_codec_top dut (.*);

  int checks = 0, failures = 0;

  // mechanism counters
  int n_enc_gran = 0, n_dec_gran = 0, n_pingpong = 0, n_gated = 0;
  int n_ext = 0, n_ch1_enc = 0, n_ch1_dec = 0, n_prev_used = 0;
  int n_short = 0, n_mixed = 0, n_start = 0, n_stop = 0, n_skip = 0, n_rerror = 0;
  int enc_edges = 0, dec_edges = 0;

  always @(posedge enc_clk) enc_edges++;
  always @(posedge dec_clk) dec_edges++;
  // observed inside the decoder: zero subbands skipped, short transforms
  always @(posedge dec_clk) if (rst_n) begin
    if (dut.u_dec.u_imdct.state == 3'd2 && dut.u_dec.u_imdct.zero_sb) n_skip++;
    if (dut.u_dec.u_imdct.state == 3'd4 && dut.u_dec.u_imdct.k == 0 &&
        dut.u_dec.u_imdct.i == 0 && dut.u_dec.u_imdct.w == 0) n_short++;
  end
  // observed inside the encoder: MDCT reads of a non-zero previous granule
  always @(posedge enc_clk) if (rst_n)
    if (dut.u_enc.u_mdct.state == 3'd1 && dut.u_enc.u_mdct.n == 6'd1 &&
        dut.u_enc.u_if2.mdct_data != 0) n_prev_used++;

  // real-time budget: a 48 kHz stereo frame (2 granules x 2 channels) every
  // 24 ms at a 20 MHz IP clock leaves 120000 IP cycles per granule; the
  // busy time of each granule (START to DONE, in IP clock cycles) is kept
  localparam int RT_BUDGET = 120000;
  int enc_busy = 0, enc_busy_max = 0, dec_busy = 0, dec_busy_max = 0;
  always @(posedge enc_clk) if (rst_n) begin
    if (dut.u_enc.u_vci.busy) enc_busy++;
    else if (enc_busy != 0) begin
      if (enc_busy > enc_busy_max) enc_busy_max = enc_busy;
      enc_busy = 0;
    end
  end
  always @(posedge dec_clk) if (rst_n) begin
    if (dut.u_dec.u_vci.busy) dec_busy++;
    else if (dec_busy != 0) begin
      if (dec_busy > dec_busy_max) dec_busy_max = dec_busy;
      dec_busy = 0;
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // one PVCI transfer on the encoder (dec = 0) or decoder (dec = 1) port,
  // timed by that IP's clock
  task automatic bus(input bit dec, input logic rd, input logic [11:0] a, input logic [23:0] d,
                     output logic [23:0] rdata, output logic err);
    pvci_req_t r;
    r = '{val: 1'b1, rd: rd, be: 3'b111, addr: a, wdata: d, eop: 1'b1};
    if (dec) begin
      @(negedge dec_clk); dec_req = r;
      do @(negedge dec_clk); while (!dec_rsp.ack);
      rdata = dec_rsp.rdata; err = dec_rsp.rerror;
      @(posedge dec_clk); #1 dec_req.val = 1'b0;
    end else begin
      @(negedge enc_clk); enc_req = r;
      do @(negedge enc_clk); while (!enc_rsp.ack);
      rdata = enc_rsp.rdata; err = enc_rsp.rerror;
      @(posedge enc_clk); #1 enc_req.val = 1'b0;
    end
    if (err) n_rerror++;
  endtask

  task automatic wr(input bit dec, input int a, input longint d);
    logic [23:0] rd; logic er;
    bus(dec, 0, 12'(a), 24'(d), rd, er);
  endtask

  task automatic status(input bit dec, output logic [23:0] st);
    logic er;
    bus(dec, 1, 12'h800, 0, st, er);
  endtask

  // ------------------------------------------------------------ encoder
  longint e_pcm [3][576];
  int     e_ch [3] = '{0, 1, 0};

  task automatic enc_thread();
    logic [23:0] st, rd; logic er;
    longint exp_l [576];
    for (int i = 0; i < 512; i++) begin
      win_c[i] = longint'($urandom_range(0, 524287)) - 64'sd262144;
      wr(0, 12'hA00 + i, win_c[i]);
    end
    for (int g = 0; g < 3; g++) for (int i = 0; i < 576; i++) e_pcm[g][i] = rnd24();
    status(0, st);
    check("enc bank after reset", st[1], 0);
    for (int i = 0; i < 576; i++) wr(0, i, e_pcm[0][i]);
    for (int g = 0; g < 3; g++) begin
      int half;
      half = g % 2;
      wr(0, 12'h801, e_ch[g]);
      if (e_ch[g] == 1) n_ch1_enc++;
      wr(0, 12'h800, 1);
      status(0, st);
      check("enc busy", st[2], 1);
      // fill the other half with the next granule while this one runs
      if (g < 2) begin
        for (int i = 0; i < 576; i++) wr(0, (1 - half) * 576 + i, e_pcm[g+1][i]);
        status(0, st);
        if (st[2]) n_pingpong++;
      end
      if (g == 1) begin
        int e0;
        enc_control_word = 2'b00;
        repeat (4) @(posedge sys_clk);
        e0 = enc_edges;
        repeat (3000) @(posedge sys_clk);
        check("encoder clock gated", enc_edges - e0, 0);
        if (enc_edges == e0) n_gated++;
        enc_control_word = 2'b10;
      end
      do status(0, st); while (!st[0]);
      check("enc bank toggled", st[1], 1 - half);
      m_in = e_pcm[g];
      encode(e_ch[g]);
      exp_l = m_out;
      for (int i = 0; i < 576; i++) begin
        bus(0, 1, 12'(half * 576 + i), 0, rd, er);
        check($sformatf("enc granule %0d line %0d", g, i), sx24(rd), exp_l[i]);
      end
      n_enc_gran++;
    end
    bus(0, 1, 12'hA00, 0, rd, er);        // window table is write-only
    check("rerror on coefficient read", er, 1);
  endtask

  // ------------------------------------------------------------ decoder
  int d_ch [5]   = '{0, 1, 0, 0, 1};
  int d_maxb [5] = '{31, 20, 10, 31, 31};
  int d_bt [5]   = '{0, 2, 1, 2, 3};
  int d_mix [5]  = '{0, 1, 0, 0, 0};

  task automatic dec_thread();
    logic [23:0] st, rd; logic er;
    longint lines [576], exp_p [576];
    // switch the decoder to the external clock: disable, select, enable
    dec_control_word = 2'b00; #100;
    dec_control_word = 2'b01; #100;
    dec_control_word = 2'b11; #100;
    for (int i = 0; i < 512; i++) begin
      win_d[i] = longint'($urandom_range(0, 8388607)) - 64'sd4194304;
      wr(1, 12'hA00 + i, win_d[i]);
    end
    for (int g = 0; g < 5; g++) begin
      int half, e0;
      half = g % 2;
      for (int i = 0; i < 576; i++) begin
        lines[i] = rnd24() / 64;
        wr(1, half * 576 + i, lines[i]);
      end
      wr(1, 12'h801, {d_mix[g][0], d_bt[g][1:0], d_maxb[g][4:0], d_ch[g][0]});
      bus(1, 1, 12'h801, 0, rd, er);
      check("dec param word", rd, {d_mix[g][0], d_bt[g][1:0], d_maxb[g][4:0], d_ch[g][0]});
      if (d_ch[g] == 1) n_ch1_dec++;
      if (d_bt[g] == 2 && d_mix[g] == 1) n_mixed++;
      if (d_bt[g] == 1) n_start++;
      if (d_bt[g] == 3) n_stop++;
      e0 = dec_edges;
      wr(1, 12'h800, 1);
      do status(1, st); while (!st[0]);
      if (dut.u_dec_clk.ctrl_q == 2'b11) n_ext++;
      m_in = lines;
      decode(d_ch[g], d_maxb[g], d_bt[g], d_mix[g]);
      exp_p = m_out;
      for (int i = 0; i < 576; i++) begin
        bus(1, 1, 12'(half * 576 + i), 0, rd, er);
        check($sformatf("dec granule %0d pcm %0d", g, i), sx24(rd), exp_p[i]);
      end
      n_dec_gran++;
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    tb_mp3_model::reset();
    repeat (3) @(posedge sys_clk);
    rst_n = 1;
    repeat (2500) @(posedge sys_clk);      // memories cleared after reset
    fork
      enc_thread();
      dec_thread();
    join
    $display("longest granule: encoder %0d, decoder %0d IP cycles (budget %0d)",
             enc_busy_max, dec_busy_max, RT_BUDGET);
    check("encoder granule within real-time budget", longint'(enc_busy_max <= RT_BUDGET), 1);
    check("decoder granule within real-time budget", longint'(dec_busy_max <= RT_BUDGET), 1);
    check("encoder granule measured", longint'(enc_busy_max > 0), 1);
    check("decoder granule measured", longint'(dec_busy_max > 0), 1);
    $display("mechanisms:");
    need("encoder granules", n_enc_gran);
    need("decoder granules", n_dec_gran);
    need("ping-pong fill while busy", n_pingpong);
    need("previous granule fed to MDCT", n_prev_used);
    need("encoder clock gated", n_gated);
    need("decoder on external clock", n_ext);
    need("encoder channel 1", n_ch1_enc);
    need("decoder channel 1", n_ch1_dec);
    need("short-block subbands", n_short);
    need("mixed block granules", n_mixed);
    need("start window granules", n_start);
    need("stop window granules", n_stop);
    need("zero subbands skipped (maxb)", n_skip);
    need("RERROR responses", n_rerror);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
