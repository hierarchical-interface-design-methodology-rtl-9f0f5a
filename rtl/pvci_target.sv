// pvci_target: "interface 1" of the MP3 encode and decode IPs -- the virtual
// component interface that connects a processing core to a peripheral VCI
// (PVCI) bus.
//
// It holds the VCI controller, an input buffer (buffer1, BUF_DEPTH samples,
// plus the START register and the channel/parameter register) and an output
// buffer (BUF_DEPTH words plus the DONE register). The host writes one granule
// of GRAN_SIZE samples into buffer1, writes START, polls DONE and reads the
// results from the output buffer. The encoder instance (HAS_PARAMS = 0) keeps
// only the channel bit of the parameter word; the decoder instance
// (HAS_PARAMS = 1) also keeps maxb, block_type and mix_block_flag, which the
// host sends as ordinary data words.
//
// Address map (this design's choice):
//   0x000 .. BUF_DEPTH-1  write: buffer1 (byte enables apply)
//                         read : output buffer
//   0x800  write bit 0 = 1: START (ignored while busy)
//          read : {.., busy[2], bank[1], done[0]}
//   0x801  parameter word, dec_param_t layout:
//          {mix_block_flag[8], block_type[7:6], maxb[5:1], channel[0]}
//   0xA00 .. 0xBFF  write only: window coefficient table of the core
//   anything else: acknowledged with RERROR
//
// The two buffers are split in two halves of GRAN_SIZE words. The core reads
// and writes the half selected by "bank", which toggles at each DONE, so the
// host can fill the next granule while the present one is processed.
//
// Timing: the controller is a two-state FSM. A request seen with VAL in IDLE
// is executed at that edge and ACK is raised for exactly one cycle in the next
// (read data and RERROR with it); the initiator must hold VAL and the request
// until ACK. in_data is returned one cycle after in_addr (synchronous RAM).
// EOP is accepted and has no effect: every transfer is a single word.
module pvci_target
  import mp3_pkg::*;
#(
  parameter int BUF_DEPTH  = 1152,
  parameter int GRAN_SIZE  = 576,
  parameter bit HAS_PARAMS = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // PVCI side
  input  pvci_req_t   req,
  output pvci_rsp_t   rsp,
  // core side
  output logic        mp3_start,   // one-cycle pulse
  output dec_param_t  param,       // channel (and decoder parameters)
  input  addr_t       in_addr,
  output sample_t     in_data,
  input  addr_t       out_addr,
  input  sample_t     out_data,
  input  logic        out_we,
  input  logic        mp3_done,    // one-cycle pulse from the core
  output logic        coef_we,
  output logic [8:0]  coef_addr,
  output coef_t       coef_data
);

  localparam int AW = $clog2(BUF_DEPTH);

  typedef enum logic { S_IDLE, S_RESP } state_e;
  state_e state;

  sample_t buf_in  [BUF_DEPTH];
  sample_t buf_out [BUF_DEPTH];

  logic       bank, busy, done_q;
  logic       resp_err, resp_buf;
  logic [DATA_W-1:0] resp_data;

  // address decode
  logic is_buf, is_ctrl, is_param, is_coef;
  always_comb begin
    is_buf   = (32'(req.addr) < BUF_DEPTH);
    is_ctrl  = (req.addr == 12'h800);
    is_param = (req.addr == 12'h801);
    is_coef  = (req.addr[11:9] == 3'b101);
  end

  // core-side addresses, offset into the active half
  logic [AW-1:0] core_in_a, core_out_a, host_a;
  always_comb begin
    core_in_a  = AW'(32'(in_addr)  + (bank ? GRAN_SIZE : 0));
    core_out_a = AW'(32'(out_addr) + (bank ? GRAN_SIZE : 0));
    host_a     = AW'(req.addr);
  end

  // buffer1: written by the host, read by the core
  always_ff @(posedge clk) begin
    if (state == S_IDLE && req.val && !req.rd && is_buf) begin
      for (int b = 0; b < 3; b++)
        if (req.be[b]) buf_in[host_a][8*b +: 8] <= req.wdata[8*b +: 8];
    end
    in_data <= buf_in[core_in_a];
  end

  // output buffer: written by the core, read by the host
  sample_t out_rd;
  always_ff @(posedge clk) begin
    if (out_we) buf_out[core_out_a] <= out_data;
    out_rd <= buf_out[host_a];
  end

  // VCI controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mp3_start <= 1'b0;
      param     <= '0;
      bank      <= 1'b0;
      busy      <= 1'b0;
      done_q    <= 1'b0;
      resp_err  <= 1'b0;
      resp_data <= '0;
      resp_buf  <= 1'b0;
      coef_we   <= 1'b0;
      coef_addr <= '0;
      coef_data <= '0;
    end else begin
      mp3_start <= 1'b0;
      coef_we   <= 1'b0;
      if (mp3_done) begin
        done_q <= 1'b1;
        busy   <= 1'b0;
        bank   <= ~bank;
      end
      case (state)
        S_IDLE: if (req.val) begin
          state     <= S_RESP;
          resp_err  <= 1'b0;
          resp_data <= '0;
          resp_buf  <= 1'b0;
          if (is_ctrl) begin
            if (req.rd) resp_data <= DATA_W'({busy, bank, done_q});
            else if (req.wdata[0] && !busy) begin
              mp3_start <= 1'b1;
              busy      <= 1'b1;
              done_q    <= 1'b0;
            end
          end else if (is_param) begin
            if (req.rd) resp_data <= DATA_W'(param);
            else if (HAS_PARAMS) param <= dec_param_t'(req.wdata[$bits(dec_param_t)-1:0]);
            else                 param <= dec_param_t'({8'd0, req.wdata[0]});
          end else if (is_coef) begin
            if (req.rd) resp_err <= 1'b1;
            else begin
              coef_we   <= 1'b1;
              coef_addr <= req.addr[8:0];
              coef_data <= coef_t'(req.wdata);
            end
          end else if (is_buf) begin
            resp_buf <= req.rd;
          end else begin
            resp_err <= 1'b1;
          end
        end
        S_RESP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rsp.ack    = (state == S_RESP);
    rsp.rerror = (state == S_RESP) && resp_err;
    rsp.rdata  = '0;
    if (state == S_RESP) rsp.rdata = resp_buf ? out_rd : resp_data;
  end

  // PVCI rule: the initiator holds VAL until the target acknowledges.
  always_ff @(posedge clk)
    if (rst_n && state == S_RESP)
      assert (req.val) else $error("PVCI: VAL dropped before ACK");

endmodule
