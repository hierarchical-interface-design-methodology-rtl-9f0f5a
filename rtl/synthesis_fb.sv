// synthesis_fb: polyphase synthesis filter bank of the MP3 decoder
// (module B).
//
// Each START turns NPKT packets of 32 subband samples of one channel (18
// packets = one granule) into 32 PCM samples each. For every packet it
//   1. shifts the channel's 1024-entry V vector by 64 (a moving base
//      pointer, no data moves) and computes
//        V[i] = sum_{k=0..31} N[i][k] * S[k],  N[i][k] = cos((16+i)(2k+1)pi/64),
//      i = 0..63, with N read from a quarter-wave cosine table. Only the
//      32 rows i = 0..15 and 33..48 are summed; the published symmetries
//      of the cosine kernel give V[16] = 0, V[16+j] = -V[16-j] and
//      V[48+j] = V[48-j], each written in one extra cycle. The same
//      symmetries in the subband direction fold the inputs of a row with
//      multiplier m = 16+i: N[i][31-k] = (-1)^m N[i][k], and for even m
//      N[i][15-k] = N[i][16+k] = +-N[i][k] (sign + when m%4 = 0). An odd
//      row therefore sums 16 terms (S[k] - S[31-k]) N[i][k], an even row
//      8 terms (S[k] + S[31-k] +- (S[15-k] + S[16+k])) N[i][k],
//   2. forms the 512 windowed values from V (U[64n+j] = V[128n+j],
//      U[64n+32+j] = V[128n+96+j]) and
//        pcm[j] = sum_{n=0..15} D[j+32n] * U[j+32n],  j = 0..31,
// and writes pcm[0..31] to out_addr = 32*packet + j.
// The 32-band structure and the cosine symmetry follow the published design;
// the 512-tap window D[] is the ISO 11172-3 synthesis window, loaded into the
// coefficient RAM through coef_* (the PVCI target maps it at 0xA00..0xBFF).
// V is kept at 24 bits and saturates, so the subband input needs about
// 5 bits of headroom.
//
// Timing: one multiply-accumulate per clock, 33 + 16*(8+1) + 16*(16+1) + 512
// = 961 cycles per packet, 17298 per granule (17300 from START to DONE); done pulses one cycle after the last
// write. After reset 2048 cycles clear V; a START then is held.
// in_data must follow in_addr by one cycle.
module synthesis_fb
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
  output addr_t       out_addr,
  output sample_t     out_data,
  output logic        out_we,
  output logic        done,
  input  logic        coef_we,
  input  logic [8:0]  coef_addr,
  input  coef_t       coef_data
);

  typedef enum logic [2:0] { S_CLEAR, S_IDLE, S_LOAD, S_MAT, S_MIR, S_WIN } state_e;
  state_e state;

  sample_t    vmem [2*1024];   // {channel, physical index}
  coef_t      dmem [512];
  sample_t    s    [32];
  logic [9:0] voff [2];        // physical position of V[0] per channel

  logic       pend, ch, chq, done_d;
  logic [4:0] pkt;
  logic [5:0] n;               // load counter 0..32
  logic [5:0] i;               // computed V row 0..31
  logic [5:0] mir_idx;         // V index of the mirrored row
  sample_t    mir_val;
  logic [4:0] k;               // subband / output index
  logic [3:0] t16;             // window tap 0..15
  logic [10:0] clr;
  acc_t       acc;

  always_ff @(posedge clk)
    if (coef_we) dmem[coef_addr] <= coef_data;

  assign in_addr = addr_t'({pkt, n[4:0]});

  acc_t       p_mat, p_win, af;
  logic [5:0] ia;
  logic [4:0] klast;           // last term of the row: 7 (even m) or 15
  logic signed [DATA_W+2:0] sf; // folded input term
  logic [9:0] vidx;
  logic [8:0] didx;
  always_comb begin
    // rows computed: ia = 0..15 and 33..48; the others follow from the
    // published symmetries V[16] = 0, V[16+j] = -V[16-j], V[48+j] = V[48-j]
    ia    = (i < 6'd16) ? i : i + 6'd17;
    klast = ia[0] ? 5'd15 : 5'd7;
    if (ia[0])
      sf = (DATA_W+3)'(s[k]) - (DATA_W+3)'(s[5'd31 - k]);
    else if (ia[1])
      sf = (DATA_W+3)'(s[k]) + (DATA_W+3)'(s[5'd31 - k]) - (DATA_W+3)'(s[5'd15 - k]) - (DATA_W+3)'(s[5'd16 + k]);
    else
      sf = (DATA_W+3)'(s[k]) + (DATA_W+3)'(s[5'd31 - k]) + (DATA_W+3)'(s[5'd15 - k]) + (DATA_W+3)'(s[5'd16 + k]);
    p_mat = acc_t'(sf) * acc_t'(cos64((16 + 32'(ia)) * (2 * 32'(k) + 1)));
    af    = acc + p_mat;
    // window tap t16 of output j = k: U[j + 32 t16]
    vidx  = t16[0] ? 10'({t16[3:1], 7'd96} + 10'(k)) : 10'({t16[3:1], 7'd0} + 10'(k));
    didx  = 9'({t16, k});
    p_win = mul(vmem[{ch, 10'(voff[ch] + vidx)}], dmem[didx]);
  end

  always_ff @(posedge clk) begin
    case (state)
      S_CLEAR: vmem[clr] <= '0;
      S_LOAD:  if (n != 0) s[n-1] <= in_data;
      S_MAT: begin
        if (k == klast)                  vmem[{ch, 10'(voff[ch] + 10'(ia))}] <= round_sat(af);
        else if (k == 5'd0 && i == 6'd0) vmem[{ch, 10'(voff[ch] + 10'd16)}] <= '0;
      end
      S_MIR:   vmem[{ch, 10'(voff[ch] + 10'(mir_idx))}] <= mir_val;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR;
      clr <= '0; pend <= 1'b0; ch <= 1'b0; chq <= 1'b0; done_d <= 1'b0;
      pkt <= '0; n <= '0; i <= '0; k <= '0; t16 <= '0; acc <= '0;
      mir_idx <= '0; mir_val <= '0;
      voff <= '{default: '0};
      out_we <= 1'b0; out_addr <= '0; out_data <= '0;
      done <= 1'b0;
    end else begin
      out_we <= 1'b0;
      done   <= done_d;
      done_d <= 1'b0;
      if (start) begin pend <= 1'b1; chq <= channel; end
      case (state)
        S_CLEAR: begin
          clr <= clr + 1'b1;
          if (clr == 11'd2047) state <= S_IDLE;
        end
        S_IDLE: if (pend || start) begin
          pend <= 1'b0;
          ch   <= start ? channel : chq;
          pkt  <= '0; n <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          n <= n + 1'b1;
          if (n == 6'd32) begin
            voff[ch] <= voff[ch] - 10'd64;
            i <= '0; k <= '0; acc <= '0;
            state <= S_MAT;
          end
        end
        S_MAT: begin
          k <= k + 1'b1;
          if (k == klast) begin
            k       <= '0;
            acc     <= '0;
            mir_idx <= (i < 6'd16) ? 6'd32 - i : 6'(7'd79 - 7'(i));
            mir_val <= (i < 6'd16) ? round_sat(-af) : round_sat(af);
            state   <= S_MIR;
          end else acc <= acc + p_mat;
        end
        S_MIR: begin
          i <= i + 1'b1;
          if (i == 6'd31) begin k <= '0; t16 <= '0; state <= S_WIN; end
          else state <= S_MAT;
        end
        S_WIN: begin
          t16 <= t16 + 1'b1;
          if (t16 == 4'd15) begin
            out_we   <= 1'b1;
            out_addr <= addr_t'({pkt, k});
            out_data <= round_sat(acc + p_win);
            acc <= '0;
            k <= k + 1'b1;
            if (k == 5'd31) begin
              pkt <= pkt + 1'b1;
              n <= '0;
              if (32'(pkt) == NPKT - 1) begin state <= S_IDLE; done_d <= 1'b1; end
              else state <= S_LOAD;
            end
          end else acc <= acc + p_win;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
