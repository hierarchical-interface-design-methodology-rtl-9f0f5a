// imdct: inverse MDCT of the MP3 decoder (module A), with overlap-add and
// frequency inversion.
//
// One START processes a granule of one channel: 576 spectral lines read as
// in_addr = 18*subband + k. For every subband sb the block
//   * treats the 18 lines as zero if sb > maxb (maxb = last non-zero
//     subband) and then skips the transform,
//   * otherwise runs either the 36-point long IMDCT
//       x[i] = sum_{k=0..17} X[k] cos(pi/72 (2i+1+18)(2k+1)), i = 0..35,
//     windowed by the window of block_type (normal, start or stop), or, for
//     block_type 2 (short), three 12-point IMDCTs on X[3k+w]
//       x_w[i] = sum_{k=0..5} X[3k+w] cos(pi/24 (2i+1+6)(2k+1)), i = 0..11,
//     each windowed by the short window and overlapped into z[6+6w+i];
//     with mix_block_flag set the two lowest subbands use the normal long
//     window even in a short granule,
//   * adds the first 18 values of z to the 18 values kept from the previous
//     granule of the same channel and stores the last 18 for the next one,
//   * negates the odd samples of odd subbands (frequency inversion),
// and writes the 18 time samples to out_addr = {subband[9:5], i[4:0]}.
// The transform kernels follow the published cosine coefficient; the
// windows and the short-block layout are those of ISO 11172-3.
//
// The published symmetries of the cosine kernel halve the work: only 18 of
// the 36 long outputs (6 of the 12 short ones) are summed, the others are
// copies or negations of them.
//
// Timing: one multiply-accumulate per clock. A subband takes 19 cycles to
// load, 324 (long) or 108 (short) to transform and 18 to write; a zero
// subband takes 19. done pulses one cycle after the last write. After reset
// 1152 cycles clear the overlap memory; a START then is held until it ends.
module imdct
  import mp3_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  dec_param_t param,
  output addr_t      in_addr,
  input  sample_t    in_data,
  output addr_t      out_addr,
  output sample_t    out_data,
  output logic       out_we,
  output logic       out_channel,
  output logic       done
);

  typedef enum logic [2:0] { S_CLEAR, S_IDLE, S_LOAD, S_LONG, S_SHORT, S_OUT, S_DONE } state_e;
  state_e state;

  sample_t    ovm [2*GRAN];    // overlap memory {channel, 18*sb + i}
  sample_t    x   [18];
  sample_t    z   [36];
  dec_param_t p;
  logic       pend;
  logic [10:0] clr;
  logic [4:0] sb;
  logic [5:0] i;               // output index 0..35
  logic [4:0] k;
  logic [1:0] w;
  acc_t       acc;

  function automatic sample_t sat_add(sample_t a, sample_t b);
    logic signed [DATA_W:0] s;
    s = {a[DATA_W-1], a} + {b[DATA_W-1], b};
    if (s > (DATA_W+1)'(2**(DATA_W-1) - 1))   return sample_t'(2**(DATA_W-1) - 1);
    if (s < -(DATA_W+1)'(2**(DATA_W-1)))      return sample_t'(-(2**(DATA_W-1)));
    return sample_t'(s);
  endfunction

  logic        is_short, zero_sb;
  block_type_e bt_eff;
  always_comb begin
    is_short = (p.block_type == BT_SHORT) && !(p.mix_block_flag && sb < 5'd2);
    bt_eff   = (p.block_type == BT_SHORT && !is_short) ? BT_NORMAL : p.block_type;
    zero_sb  = sb > p.maxb;
  end

  assign in_addr = addr_t'(32'(sb) * NGRAN + 32'(k));

  // products. The kernels are evaluated only for the outputs that the
  // published symmetries do not give for free: for the 36-point IMDCT
  //   x[17-i] = -x[i], x[35-i] = x[18+i] (i = 0..8),
  // for the 12-point one
  //   x[5-i] = -x[i], x[11-i] = x[6+i]   (i = 0..2).
  // Step j computes output ia and derives its mirror ib from the same sum.
  logic [5:0] ia, ib;
  logic       neg;
  acc_t       p_long, p_short, af;
  sample_t    xa, xb, za, zb;
  logic [4:0] ks;
  always_comb begin
    if (state == S_SHORT) begin
      neg = (i < 6'd3);
      ia  = neg ? i : i + 6'd3;
      ib  = neg ? 6'd5 - i : 6'd14 - i;
    end else begin
      neg = (i < 6'd9);
      ia  = neg ? i : i + 6'd9;
      ib  = neg ? 6'd17 - i : 6'd44 - i;
    end
    ks      = 5'(3 * 32'(k) + 32'(w));
    p_long  = mul(x[k], cos72((2 * 32'(ia) + 19) * (2 * 32'(k) + 1)));
    p_short = mul(x[ks], cos72(3 * (2 * 32'(ia) + 7) * (2 * 32'(k) + 1)));
    af      = acc + ((state == S_SHORT) ? p_short : p_long);
    xa      = round_sat(af);
    xb      = neg ? round_sat(-af) : xa;
    if (state == S_SHORT) begin
      za = round_sat(mul(xa, WIN_SHORT[ia]));
      zb = round_sat(mul(xb, WIN_SHORT[ib]));
    end else begin
      za = round_sat(mul(xa, win(bt_eff, 32'(ia))));
      zb = round_sat(mul(xb, win(bt_eff, 32'(ib))));
    end
  end

  // overlap-add and frequency inversion of output sample i (0..17)
  logic [10:0] oi;
  sample_t     y;
  always_comb begin
    oi = 11'(32'(p.channel) * GRAN + 32'(sb) * NGRAN + 32'(i));
    y  = sat_add(z[i], ovm[oi]);
    if (sb[0] && i[0]) y = (y == sample_t'(-(2**(DATA_W-1)))) ? sample_t'(2**(DATA_W-1) - 1) : -y;
  end

  always_ff @(posedge clk) begin
    case (state)
      S_CLEAR: ovm[clr] <= '0;
      S_LOAD:  if (k != 0) x[k-1] <= in_data;
      S_OUT:   ovm[oi] <= z[i+18];
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR;
      clr <= '0; pend <= 1'b0; p <= '0;
      sb <= '0; i <= '0; k <= '0; w <= '0; acc <= '0;
      z <= '{default: '0};
      out_we <= 1'b0; out_addr <= '0; out_data <= '0; out_channel <= 1'b0;
      done <= 1'b0;
    end else begin
      out_we <= 1'b0;
      done   <= 1'b0;
      if (start) begin pend <= 1'b1; p <= param; end
      case (state)
        S_CLEAR: begin
          clr <= clr + 1'b1;
          if (32'(clr) == 2*GRAN - 1) state <= S_IDLE;
        end
        S_IDLE: if (pend || start) begin
          pend <= 1'b0;
          if (start) p <= param;
          sb <= '0; k <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (zero_sb) begin
            z <= '{default: '0};
            i <= '0;
            state <= S_OUT;
          end else begin
            k <= k + 1'b1;
            if (k == 5'd18) begin
              k <= '0; i <= '0; w <= '0; acc <= '0;
              z <= '{default: '0};
              state <= is_short ? S_SHORT : S_LONG;
            end
          end
        end
        S_LONG: begin
          if (k == 5'd17) begin
            z[ia] <= za;
            z[ib] <= zb;
            acc <= '0; k <= '0;
            i <= i + 1'b1;
            if (i == 6'd17) begin i <= '0; state <= S_OUT; end
          end else begin
            acc <= acc + p_long;
            k <= k + 1'b1;
          end
        end
        S_SHORT: begin
          if (k == 5'd5) begin
            z[6 + 6*32'(w) + 32'(ia)] <= sat_add(z[6 + 6*32'(w) + 32'(ia)], za);
            z[6 + 6*32'(w) + 32'(ib)] <= sat_add(z[6 + 6*32'(w) + 32'(ib)], zb);
            acc <= '0; k <= '0;
            i <= i + 1'b1;
            if (i == 6'd5) begin
              i <= '0;
              w <= w + 1'b1;
              if (w == 2'd2) begin w <= '0; state <= S_OUT; end
            end
          end else begin
            acc <= acc + p_short;
            k <= k + 1'b1;
          end
        end
        S_OUT: begin
          out_we      <= 1'b1;
          out_addr    <= addr_t'({sb, i[4:0]});
          out_data    <= y;
          out_channel <= p.channel;
          i <= i + 1'b1;
          if (i == 6'd17) begin
            i <= '0; k <= '0;
            sb <= sb + 1'b1;
            state <= (sb == 5'd31) ? S_DONE : S_LOAD;
          end
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
