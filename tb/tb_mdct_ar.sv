// tb_mdct_ar: self-checking test of the MDCT with alias reduction. Two
// random 32x36 input sets are served from a model of interface 2; the 576
// output lines are compared with a reference that windows, transforms and
// reduces aliasing from the real-valued formulas, and the start-to-done time
// is checked against 12872 + 2 cycles.
module tb_mdct_ar;
  import mp3_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, channel = 0;
  addr_t in_addr, out_addr;
  sample_t in_data, out_data;
  logic out_we, out_channel, done;

  mdct_ar dut (.*);

  longint inp [32][36];
  always_ff @(posedge clk) in_data <= sample_t'(inp[in_addr[10:6]][in_addr[5:0] % 36]);

  int checks = 0, failures = 0, nout;
  longint got [576], expd [576];
  always @(posedge clk) if (out_we) begin got[out_addr] = sx24(out_data); nout++; end

  localparam real C [8] = '{-0.6, -0.535, -0.33, -0.185, -0.095, -0.041, -0.0142, -0.0037};

  task automatic model();
    for (int s = 0; s < 32; s++) begin
      longint zz [36];
      for (int n = 0; n < 36; n++)
        zz[n] = rs(inp[s][n] * q($sin(RPI / 36.0 * (real'(n) + 0.5))));
      for (int k = 0; k < 18; k++) begin
        longint a = 0;
        for (int n = 0; n < 36; n++)
          a += zz[n] * q($cos(RPI / 72.0 * real'((2*n + 19) * (2*k + 1))));
        expd[s*18+k] = rs(a);
      end
    end
    for (int s = 1; s < 32; s++)
      for (int i = 0; i < 8; i++) begin
        longint a, b, cs, ca;
        cs = q(1.0 / $sqrt(1.0 + C[i]*C[i]));
        ca = q(C[i] / $sqrt(1.0 + C[i]*C[i]));
        a = expd[18*s-1-i]; b = expd[18*s+i];
        expd[18*s-1-i] = rs(a*cs + b*ca);
        expd[18*s+i]   = rs(b*cs - a*ca);
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int cyc;
      for (int s = 0; s < 32; s++) for (int n = 0; n < 36; n++) inp[s][n] = rnd24();
      model();
      nout = 0; cyc = 0;
      @(negedge clk); start = 1; channel = run[0];
      @(negedge clk); start = 0;
      while (!done) begin @(posedge clk); cyc++; end
      checks++;
      if (cyc != 12872 + 2) begin failures++; $display("latency %0d", cyc); end
      checks++;
      if (nout != 576 || out_channel != run[0]) begin failures++; $display("nout %0d", nout); end
      for (int i = 0; i < 576; i++) begin
        checks++;
        if (got[i] != expd[i]) begin
          failures++;
          if (failures < 10) $display("line %0d: got %0d exp %0d", i, got[i], expd[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
