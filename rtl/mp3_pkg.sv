// mp3_pkg: types, fixed-point helpers and coefficient tables shared by the
// MP3 codec hardware (analysis/synthesis polyphase filter banks, MDCT/IMDCT,
// the PVCI target and the buffer interfaces between the units).
//
// Number formats (this design's choice; the data buses are 24 bits wide as in
// the published port lists):
//   * samples and spectral lines are 24-bit two's-complement integers;
//   * coefficients are 24-bit two's-complement with COEF_FRAC = 22 fraction
//     bits (range -2.0 .. +2.0);
//   * every multiply-accumulate is done at ACC_W bits and brought back to
//     24 bits by round_sat(): add half an LSB, shift right by COEF_FRAC,
//     saturate to the 24-bit range.
//
// The cosine tables are computed at elaboration time from their formulas and
// stored as quarter waves, using the symmetry of the cosine kernels:
//   cos64(m) = cos(m*pi/64), m taken modulo 128 (filter-bank matrixing)
//   cos72(m) = cos(m*pi/72), m taken modulo 144 (MDCT / IMDCT, 12-point
//              short-block IMDCT uses cos(m*pi/24) = cos72(3m))
// Window and alias-reduction coefficients are those of ISO 11172-3 layer III,
// also computed from their formulas.
package mp3_pkg;

  localparam int DATA_W    = 24;
  localparam int ADDR_W    = 12;
  localparam int COEF_W    = 24;
  localparam int COEF_FRAC = 22;
  localparam int ACC_W     = 56;

  localparam int NSB       = 32;    // subbands
  localparam int NGRAN     = 18;    // subband samples per subband per granule
  localparam int GRAN      = NSB * NGRAN;  // 576 samples per granule
  localparam int NCH       = 2;     // channels with separate filter state

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic        [ADDR_W-1:0] addr_t;

  // ---------------------------------------------------------------- PVCI
  // Peripheral VCI request (initiator -> target) and response.
  typedef struct packed {
    logic            val;     // request valid, held until ack
    logic            rd;      // 1 = read, 0 = write
    logic [2:0]      be;      // byte enables of wdata
    addr_t           addr;
    logic [DATA_W-1:0] wdata;
    logic            eop;     // end of packet
  } pvci_req_t;

  typedef struct packed {
    logic            ack;     // one-cycle acknowledge
    logic [DATA_W-1:0] rdata; // valid with ack on reads
    logic            rerror;  // valid with ack: bad address or access
  } pvci_rsp_t;

  // Block type of a granule (ISO 11172-3 encoding).
  typedef enum logic [1:0] {
    BT_NORMAL = 2'd0, BT_START = 2'd1, BT_SHORT = 2'd2, BT_STOP = 2'd3
  } block_type_e;

  // Per-granule decoding parameters carried in the decoder's parameter word.
  typedef struct packed {
    logic        mix_block_flag;
    block_type_e block_type;
    logic [4:0]  maxb;
    logic        channel;
  } dec_param_t;

  // ------------------------------------------------------ fixed point
  function automatic sample_t round_sat(acc_t acc);
    acc_t r;
    r = (acc + (acc_t'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > acc_t'(2**(DATA_W-1) - 1))       return sample_t'(2**(DATA_W-1) - 1);
    else if (r < -acc_t'(2**(DATA_W-1)))     return sample_t'(-(2**(DATA_W-1)));
    else                                     return sample_t'(r);
  endfunction

  function automatic acc_t mul(sample_t a, coef_t c);
    return acc_t'(a) * acc_t'(c);
  endfunction

  localparam real PI = 3.14159265358979323846;

  function automatic coef_t to_coef(real x);
    return coef_t'(longint'(x * real'(longint'(1) << COEF_FRAC)));
  endfunction

  // ------------------------------------------------------ quarter waves
  typedef coef_t q64_t [33];
  typedef coef_t q72_t [37];

  function automatic q64_t mk_q64();
    q64_t t;
    for (int m = 0; m <= 32; m++) t[m] = to_coef($cos(real'(m) * PI / 64.0));
    return t;
  endfunction

  function automatic q72_t mk_q72();
    q72_t t;
    for (int m = 0; m <= 36; m++) t[m] = to_coef($cos(real'(m) * PI / 72.0));
    return t;
  endfunction

  localparam q64_t Q64 = mk_q64();
  localparam q72_t Q72 = mk_q72();

  // cos(m*pi/64) from the quarter wave: fold the period 128 into 0..32.
  function automatic coef_t cos64(int unsigned m);
    int unsigned r;
    r = m % 128;
    if (r > 64) r = 128 - r;                 // cos(2pi - x) = cos(x)
    if (r > 32) return -Q64[64 - r];         // cos(pi - x) = -cos(x)
    return Q64[r];
  endfunction

  // cos(m*pi/72) from the quarter wave: fold the period 144 into 0..36.
  function automatic coef_t cos72(int unsigned m);
    int unsigned r;
    r = m % 144;
    if (r > 72) r = 144 - r;
    if (r > 36) return -Q72[72 - r];
    return Q72[r];
  endfunction

  // ------------------------------------------------------ windows
  // Long windows for block types 0 (normal), 1 (start), 3 (stop) and the
  // 12-point short window (type 2), ISO 11172-3 2.4.3.4.10.3.
  typedef coef_t win_t [36];

  function automatic win_t mk_win(int bt);
    win_t w;
    for (int i = 0; i < 36; i++) begin
      real x;
      x = $sin(PI / 36.0 * (real'(i) + 0.5));              // normal window
      if (bt == 1) begin                                   // start
        if (i >= 18 && i < 24)      x = 1.0;
        else if (i >= 24 && i < 30) x = $sin(PI / 12.0 * (real'(i) - 18.0 + 0.5));
        else if (i >= 30)           x = 0.0;
      end else if (bt == 3) begin                          // stop
        if (i < 6)                  x = 0.0;
        else if (i < 12)            x = $sin(PI / 12.0 * (real'(i) - 6.0 + 0.5));
        else if (i < 18)            x = 1.0;
      end else if (bt == 2) begin                          // short, 12 taps
        x = (i < 12) ? $sin(PI / 12.0 * (real'(i) + 0.5)) : 0.0;
      end
      w[i] = to_coef(x);
    end
    return w;
  endfunction

  localparam win_t WIN_NORMAL = mk_win(0);
  localparam win_t WIN_START  = mk_win(1);
  localparam win_t WIN_SHORT  = mk_win(2);
  localparam win_t WIN_STOP   = mk_win(3);

  function automatic coef_t win(block_type_e bt, int unsigned i);
    case (bt)
      BT_START: return WIN_START[i];
      BT_SHORT: return WIN_SHORT[i];
      BT_STOP:  return WIN_STOP[i];
      default:  return WIN_NORMAL[i];
    endcase
  endfunction

  // ------------------------------------------------------ alias reduction
  typedef coef_t ar_t [8];

  function automatic real ar_c(int i);
    case (i)
      0: return -0.6;    1: return -0.535;  2: return -0.33;   3: return -0.185;
      4: return -0.095;  5: return -0.041;  6: return -0.0142; default: return -0.0037;
    endcase
  endfunction

  function automatic ar_t mk_cs();
    ar_t t;
    for (int i = 0; i < 8; i++) t[i] = to_coef(1.0 / $sqrt(1.0 + ar_c(i) * ar_c(i)));
    return t;
  endfunction

  function automatic ar_t mk_ca();
    ar_t t;
    for (int i = 0; i < 8; i++) t[i] = to_coef(ar_c(i) / $sqrt(1.0 + ar_c(i) * ar_c(i)));
    return t;
  endfunction

  localparam ar_t AR_CS = mk_cs();
  localparam ar_t AR_CA = mk_ca();

endpackage
