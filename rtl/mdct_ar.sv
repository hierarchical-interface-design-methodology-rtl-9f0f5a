// mdct_ar: MDCT and alias reduction of the MP3 encoder (module B), long
// blocks only.
//
// For each of the 32 subbands the block reads 36 samples (18 of the previous
// and 18 of the current granule, in_addr = {subband, n}), windows them with
// the normal long window w[n] = sin(pi/36 (n + 1/2)) and computes
//   X[k] = sum_{n=0..35} z[n] * c(n,k),  c(n,k) = cos(pi/72 (2n+1+18)(2k+1)),
// k = 0..17, the published MDCT kernel for n = 36, read from a quarter-wave
// table. The published symmetries of the kernel, c(17-i,k) = -c(i,k) and
// c(35-i,k) = c(18+i,k), fold the 36 windowed samples into 18 sums and
// differences first, so each line costs 18 multiply-accumulates. The 576 lines are kept locally; then, for every boundary between
// subbands sb-1 and sb, eight butterflies reduce the aliasing:
//   a = X[18sb-1-i], b = X[18sb+i]
//   a' = a*cs_i + b*ca_i,   b' = b*cs_i - a*ca_i,   i = 0..7
// with the ISO 11172-3 coefficients cs_i, ca_i. Finally the 576 lines are
// written to the output buffer (out_addr = 18*subband + k) and done pulses.
// Only long blocks are built, as in the published encoder; the window and
// the alias-reduction coefficients are taken from the MP3 standard.
//
// Timing: one multiply-accumulate per clock. A subband takes 37 + 324
// cycles, the alias reduction 3 cycles per butterfly, the write-out 576
// cycles: 32*361 + 248*3 + 576 = 12872 cycles from start to the last write.
// in_data must follow in_addr by one cycle.
module mdct_ar
  import mp3_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    channel,
  output addr_t   in_addr,
  input  sample_t in_data,
  output addr_t   out_addr,
  output sample_t out_data,
  output logic    out_we,
  output logic    out_channel,
  output logic    done
);

  typedef enum logic [2:0] { S_IDLE, S_LOAD, S_MAC, S_AR, S_OUT, S_DONE } state_e;
  state_e state;

  sample_t lines [GRAN];
  sample_t z     [36];
  logic [4:0] sb;
  logic [5:0] n;
  logic [4:0] k;
  logic [1:0] ph;
  logic [2:0] ai;
  logic [9:0] oa;
  acc_t       acc;
  sample_t    a_q, b_q;

  assign in_addr = addr_t'({1'b0, sb, n});

  // MDCT product on folded inputs. With c(i,k) = cos(pi/72 (2i+19)(2k+1)):
  //   c(17-i,k) = -c(i,k)  and  c(35-i,k) = c(18+i,k),  i = 0..8,
  // so X[k] = sum_{j=0..8} (z[j] - z[17-j]) c(j,k)
  //         + sum_{j=0..8} (z[18+j] + z[35-j]) c(18+j,k): 18 terms, not 36.
  logic signed [DATA_W:0] u;
  logic [5:0] ci;                       // kernel row of term n
  acc_t   p_mac;
  logic [9:0] lk;
  always_comb begin
    if (n < 6'd9) begin
      u  = {z[n][DATA_W-1], z[n]} - {z[17-n][DATA_W-1], z[17-n]};
      ci = n;
    end else begin
      u  = {z[n+9][DATA_W-1], z[n+9]} + {z[44-n][DATA_W-1], z[44-n]};
      ci = n + 6'd9;
    end
    p_mac = acc_t'(u) * acc_t'(cos72((2 * 32'(ci) + 19) * (2 * 32'(k) + 1)));
    lk    = 10'(32'(sb) * NGRAN + 32'(k));
  end

  // alias-reduction butterfly on the latched pair
  logic [9:0] ia, ib;
  sample_t    a_new, b_new;
  always_comb begin
    ia    = 10'(32'(sb) * NGRAN - 1 - 32'(ai));
    ib    = 10'(32'(sb) * NGRAN + 32'(ai));
    a_new = round_sat(mul(a_q, AR_CS[ai]) + mul(b_q, AR_CA[ai]));
    b_new = round_sat(mul(b_q, AR_CS[ai]) - mul(a_q, AR_CA[ai]));
  end

  always_ff @(posedge clk) begin
    case (state)
      S_LOAD: if (n != 0) z[n-1] <= round_sat(mul(in_data, WIN_NORMAL[n-1]));
      S_MAC:  if (n == 6'd17) lines[lk] <= round_sat(acc + p_mac);
      S_AR: begin
        if (ph == 2'd0) begin a_q <= lines[ia]; b_q <= lines[ib]; end
        if (ph == 2'd1) lines[ia] <= a_new;
        if (ph == 2'd2) lines[ib] <= b_new;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sb <= '0; n <= '0; k <= '0; ph <= '0; ai <= '0; oa <= '0;
      acc <= '0;
      out_we <= 1'b0; out_addr <= '0; out_data <= '0;
      out_channel <= 1'b0;
      done <= 1'b0;
    end else begin
      out_we <= 1'b0;
      done   <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          out_channel <= channel;
          sb <= '0; n <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          n <= n + 1'b1;
          if (n == 6'd36) begin n <= '0; k <= '0; acc <= '0; state <= S_MAC; end
        end
        S_MAC: begin
          if (n == 6'd17) begin
            n   <= '0;
            acc <= '0;
            k   <= k + 1'b1;
            if (k == 5'd17) begin
              sb <= sb + 1'b1;
              if (sb == 5'd31) begin sb <= 5'd1; ai <= '0; ph <= '0; state <= S_AR; end
              else state <= S_LOAD;
            end
          end else begin
            n   <= n + 1'b1;
            acc <= acc + p_mac;
          end
        end
        S_AR: begin
          ph <= ph + 1'b1;
          if (ph == 2'd2) begin
            ph <= '0;
            ai <= ai + 1'b1;
            if (ai == 3'd7) begin
              sb <= sb + 1'b1;
              if (sb == 5'd31) begin oa <= '0; state <= S_OUT; end
            end
          end
        end
        S_OUT: begin
          out_we   <= 1'b1;
          out_addr <= addr_t'(oa);
          out_data <= lines[oa];
          oa <= oa + 1'b1;
          if (32'(oa) == GRAN - 1) state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
