// analysis_fb: polyphase analysis filter bank of the MP3 encoder (module A).
//
// Each START processes NPKT packets of 32 PCM samples of one channel (18
// packets = one 576-sample granule). For every packet it
//   1. shifts the 32 new samples into the channel's 512-sample history X
//      (newest sample at X[0]),
//   2. windows and folds: Y[k] = sum_{j=0..7} C[k+64j] * X[k+64j], k = 0..63,
//   3. matrixes: S[i] = sum_{k=0..63} M[i][k] * Y[k], i = 0..31, with
//      M[i][k] = cos((2i+1)(k-16)pi/64), read from a quarter-wave table.
//      The published symmetries of M in k (M[i][k] = M[i][32-k],
//      M[i][16] = 1, M[i][48] = 0, and the sign-flipped pairs k, 96-k) first
//      fold the 64 values of Y into 32 sums and differences f[m], m = 0..31.
//      The published symmetries in the subband direction then let one
//      product serve several subbands: with c = cos((2i+1)m pi/64),
//      subbands i, 31-i, 15-i, 16+i get +c, +c, +-c, +-c for even m (sign
//      + when m%4 = 0), and i, 31-i get +c, -c for odd m, while 15-i, 16+i
//      share a second product with opposite signs. Subbands are computed in
//      8 groups {g, 31-g, 15-g, 16+g} with four accumulators: 16 + 2*16 =
//      48 multiply-accumulates per group, 384 per packet (2048 for the plain
//      32 x 64 product),
// and writes S[0..31] as one packet of 32 subband samples to sb_addr =
// packet*32 + i, four writes after each group (order g, 31-g, 15-g, 16+g).
// The matrixing coefficient and the 32-subband split are the published ones.
// The 512-tap window C[] is the ISO 11172-3 analysis window, which is loaded
// into the coefficient RAM through coef_* (the PVCI target maps it at
// 0xA00..0xBFF); its values are not part of this RTL.
//
// One multiply-accumulate per clock: a packet takes 33 + 512 + 8 * (48 + 4)
// = 961 cycles, a granule 18 * 961 = 17298 cycles (17300 from START to
// DONE). After reset the block spends 1024
// cycles clearing the history of both channels; a START during that time is
// held and served afterwards.
// in_data must arrive one cycle after in_addr. done pulses for one cycle,
// one cycle after the last subband sample is written.
module analysis_fb
  import mp3_pkg::*;
#(
  parameter int NPKT = 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        channel,
  output addr_t       in_addr,
  input  sample_t     in_data,
  output addr_t       sb_addr,
  output sample_t     sb_data,
  output logic        sb_we,
  output logic        sb_channel,
  output logic        done,
  input  logic        coef_we,
  input  logic [8:0]  coef_addr,
  input  coef_t       coef_data
);

  typedef enum logic [2:0] { S_CLEAR, S_IDLE, S_LOAD, S_WIN, S_MAT, S_WR } state_e;
  state_e state;

  sample_t xmem [2*512];      // {channel, physical index}
  coef_t   cmem [512];
  sample_t y    [64];
  logic [8:0] xoff [2];       // physical position of X[0] per channel

  logic       pend, ch, done_d;
  logic [4:0] pkt;
  logic [5:0] n;              // load counter 0..32
  logic [5:0] k;
  logic [2:0] j;
  logic [2:0] g;              // subband group
  logic       ph;             // odd m: 0 = subbands g/31-g, 1 = 15-g/16+g
  logic [1:0] w;              // write-out counter of a group
  logic [9:0] clr;
  acc_t       acc;
  acc_t       sacc [4];       // subbands g, 31-g, 15-g, 16+g
  acc_t       sacc_n [4];
  sample_t    wq   [4];
  logic [4:0] wsb;

  always_ff @(posedge clk)
    if (coef_we) cmem[coef_addr] <= coef_data;

  // products of the two MAC phases
  logic [8:0] xi;             // logical X index in the window phase
  acc_t       p_win, p_mat;
  logic [6:0] m_mat;
  logic signed [DATA_W:0] f;
  always_comb begin
    xi    = {j, k};
    p_win = mul(xmem[{ch, 9'(xoff[ch] + xi)}], cmem[xi]);
    // folded matrixing term m = k (0..31), from the published symmetries
    // M[i][16-m] = M[i][16+m], M[i][16+m] = -M[i][80-m], M[i][48] = 0
    if (k == 6'd0)       f = {y[16][DATA_W-1], y[16]};
    else if (k <= 6'd16) f = {y[16-k][DATA_W-1], y[16-k]} + {y[16+k][DATA_W-1], y[16+k]};
    else                 f = {y[16+k][DATA_W-1], y[16+k]} - {y[80-k][DATA_W-1], y[80-k]};
    m_mat = 7'(7'({ph ? 5'(5'd15 - 5'(g)) : 5'(g), 1'b1}) * 7'(k));
    p_mat = acc_t'(f) * acc_t'(cos64(32'(m_mat)));
    sacc_n = sacc;
    if (!k[0]) begin
      sacc_n[0] = sacc[0] + p_mat;
      sacc_n[1] = sacc[1] + p_mat;
      sacc_n[2] = k[1] ? sacc[2] - p_mat : sacc[2] + p_mat;
      sacc_n[3] = k[1] ? sacc[3] - p_mat : sacc[3] + p_mat;
    end else if (!ph) begin
      sacc_n[0] = sacc[0] + p_mat;
      sacc_n[1] = sacc[1] - p_mat;
    end else begin
      sacc_n[2] = sacc[2] + p_mat;
      sacc_n[3] = sacc[3] - p_mat;
    end
    case (w)
      2'd0:    wsb = 5'(g);
      2'd1:    wsb = 5'(5'd31 - 5'(g));
      2'd2:    wsb = 5'(5'd15 - 5'(g));
      default: wsb = 5'(5'd16 + 5'(g));
    endcase
  end

  assign in_addr = addr_t'({pkt, n[4:0]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR;
      clr   <= '0;
      pend  <= 1'b0;
      ch    <= 1'b0;
      pkt   <= '0;
      n     <= '0;
      k     <= '0;
      j     <= '0;
      g     <= '0;
      ph    <= 1'b0;
      w     <= '0;
      acc   <= '0;
      sacc  <= '{default: '0};
      wq    <= '{default: '0};
      xoff  <= '{default: '0};
      sb_we <= 1'b0;
      sb_addr <= '0;
      sb_data <= '0;
      sb_channel <= 1'b0;
      done  <= 1'b0;
      done_d <= 1'b0;
    end else begin
      sb_we  <= 1'b0;
      done   <= done_d;
      done_d <= 1'b0;
      if (start) begin
        pend       <= 1'b1;
        sb_channel <= channel;
      end
      case (state)
        S_CLEAR: begin
          xmem[clr] <= '0;
          clr <= clr + 1'b1;
          if (clr == 10'd1023) state <= S_IDLE;
        end
        S_IDLE: if (pend || start) begin
          pend  <= 1'b0;
          ch    <= start ? channel : sb_channel;
          pkt   <= '0;
          n     <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (n == 0) xoff[ch] <= xoff[ch] - 9'd32;
          // sample n-1 arrives now; sample s goes to X[31-s]
          if (n != 0) xmem[{ch, 9'(xoff[ch] + 9'd31 - 9'(n - 1'b1))}] <= in_data;
          n <= n + 1'b1;
          if (n == 6'd32) begin
            state <= S_WIN;
            k <= '0; j <= '0; acc <= '0;
          end
        end
        S_WIN: begin
          j <= j + 1'b1;
          if (j == 3'd7) begin
            y[k] <= round_sat(acc + p_win);
            acc  <= '0;
            k    <= k + 1'b1;
            if (k == 6'd63) begin
              state <= S_MAT;
              k     <= '0;
              g     <= '0;
              ph    <= 1'b0;
              sacc  <= '{default: '0};
            end
          end else acc <= acc + p_win;
        end
        S_MAT: begin
          sacc <= sacc_n;
          if (k[0] && !ph) ph <= 1'b1;
          else begin
            ph <= 1'b0;
            k  <= k + 1'b1;
            if (k == 6'd31) begin
              for (int q = 0; q < 4; q++) wq[q] <= round_sat(sacc_n[q]);
              k     <= '0;
              w     <= '0;
              state <= S_WR;
            end
          end
        end
        S_WR: begin
          sb_we   <= 1'b1;
          sb_addr <= addr_t'({pkt, wsb});
          sb_data <= wq[w];
          w       <= w + 1'b1;
          if (w == 2'd3) begin
            sacc  <= '{default: '0};
            g     <= g + 1'b1;
            state <= S_MAT;
            if (g == 3'd7) begin
              pkt <= pkt + 1'b1;
              n   <= '0;
              if (32'(pkt) == NPKT - 1) begin
                state  <= S_IDLE;
                done_d <= 1'b1;
              end else state <= S_LOAD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
