// tb_pvci_target: self-checking test of the PVCI target (interface 1), in
// its decoder form (with the parameter word) and its encoder form (channel
// only). It checks single-word writes with byte enables into buffer1, core
// reads of buffer1 in both halves, core writes and host reads of the output
// buffer, the START pulse, the busy/bank/done status, the parameter word,
// window-coefficient writes, RERROR on bad accesses and the one-cycle ACK.
module tb_pvci_target;
  import mp3_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pvci_req_t req = '0;
  pvci_rsp_t rsp, rsp_e;
  logic mp3_start, mp3_start_e;
  dec_param_t param, param_e;
  addr_t in_addr = 0, out_addr = 0;
  sample_t in_data, in_data_e, out_data = 0;
  logic out_we = 0, mp3_done = 0;
  logic coef_we, coef_we_e;
  logic [8:0] coef_addr, coef_addr_e;
  coef_t coef_data, coef_data_e;

  pvci_target #(.HAS_PARAMS(1'b1)) dut (.*);
  pvci_target #(.HAS_PARAMS(1'b0)) dut_e (
    .clk, .rst_n, .req, .rsp(rsp_e), .mp3_start(mp3_start_e), .param(param_e),
    .in_addr, .in_data(in_data_e), .out_addr, .out_data, .out_we, .mp3_done,
    .coef_we(coef_we_e), .coef_addr(coef_addr_e), .coef_data(coef_data_e));

  int checks = 0, failures = 0;
  int starts = 0, coefs = 0;
  logic [8:0] last_ca; coef_t last_cd;
  always @(posedge clk) begin
    if (rst_n && mp3_start) starts++;
    if (rst_n && coef_we) begin coefs++; last_ca = coef_addr; last_cd = coef_data; end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic bus(input logic rd, input logic [11:0] a, input logic [23:0] d,
                     input logic [2:0] be, output logic [23:0] rdata, output logic err);
    int wait_cyc = 0;
    @(negedge clk);
    req.val = 1; req.rd = rd; req.addr = a; req.wdata = d; req.be = be; req.eop = 1;
    do begin @(negedge clk); wait_cyc++; end while (!rsp.ack);
    rdata = rsp.rdata; err = rsp.rerror;
    check("ack after one cycle", wait_cyc, 1);
    @(posedge clk); #1 req.val = 0;       // ACK sampled at this edge
  endtask

  logic [23:0] rd; logic er;
  longint img [1152];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill buffer1 with full words, then patch one byte lane
    for (int i = 0; i < 1152; i += 7) begin
      img[i] = $urandom_range(0, 24'hffffff);
      bus(0, 12'(i), 24'(img[i]), 3'b111, rd, er);
      check("write err", er, 0);
    end
    bus(0, 12'd7, 24'hABCDEF, 3'b010, rd, er);
    img[7] = (img[7] & 24'hFF00FF) | 24'h00CD00;
    // core reads, bank 0 (lower half)
    for (int i = 0; i < 576; i += 7) begin
      @(negedge clk); in_addr = 12'(i);
      @(negedge clk); check("in_data bank0", longint'(unsigned'(in_data)), img[i]);
    end
    // parameter word
    bus(0, 12'h801, 24'h1A5, 3'b111, rd, er);
    check("param", param, 9'h1A5);
    check("param enc (channel only)", param_e, 9'h001);
    bus(1, 12'h801, 0, 3'b111, rd, er);
    check("param read", rd, 24'h1A5);
    // START, status busy
    bus(0, 12'h800, 24'h1, 3'b111, rd, er);
    check("start pulses", starts, 1);
    bus(1, 12'h800, 0, 3'b111, rd, er);
    check("status busy", rd, 24'b100);
    bus(0, 12'h800, 24'h1, 3'b111, rd, er);
    check("no start while busy", starts, 1);
    // core writes results, then done
    for (int i = 0; i < 576; i += 5) begin
      @(negedge clk); out_we = 1; out_addr = 12'(i); out_data = sample_t'(i * 3 + 1);
    end
    @(negedge clk); out_we = 0; mp3_done = 1;
    @(negedge clk); mp3_done = 0;
    bus(1, 12'h800, 0, 3'b111, rd, er);
    check("status done, bank 1", rd, 24'b011);
    for (int i = 0; i < 576; i += 5) begin
      bus(1, 12'(i), 0, 3'b111, rd, er);
      check("output buffer", rd, i * 3 + 1);
      check("read err", er, 0);
    end
    // bank 1: core addresses land in the upper half
    for (int i = 0; i < 576; i += 7) begin
      @(negedge clk); in_addr = 12'(i);
      @(negedge clk);
      if ((i + 576) % 7 == 0) check("in_data bank1", longint'(unsigned'(in_data)), img[i + 576]);
    end
    @(negedge clk); out_we = 1; out_addr = 12'd3; out_data = 24'h123456;
    @(negedge clk); out_we = 0;
    bus(1, 12'd579, 0, 3'b111, rd, er);
    check("output bank1", rd, 24'h123456);
    // window coefficient write
    bus(0, 12'hA05, 24'h654321, 3'b111, rd, er);
    check("coef write", coefs, 1);
    check("coef addr", last_ca, 5);
    check("coef data", last_cd, 24'h654321);
    // errors
    bus(1, 12'hA05, 0, 3'b111, rd, er);
    check("coef read error", er, 1);
    bus(0, 12'h700, 0, 3'b111, rd, er);
    check("bad address error", er, 1);
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
