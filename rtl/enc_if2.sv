// enc_if2: "interface 2" of the MP3 encoder, the static point-to-point link
// from the analysis filter bank to the MDCT.
//
// The filter bank delivers a granule as 18 packets of 32 subband samples
// (sb_addr = packet*32 + subband); the MDCT wants 32 packets of 36 samples,
// one per subband, made of the 18 samples of the previous granule followed by
// the 18 of the current one. The block keeps, for each channel, a "current"
// and a "previous" 32x18 buffer. Instead of copying current into previous,
// the two banks swap roles at each sb_done, so the bank just written becomes
// current and the other one (previous) is the one overwritten next.
//
// MDCT side: mdct_addr = {subband[10:6], n[5:0]}, n = 0..35, with n < 18
// taken from the previous and n >= 18 from the current buffer. mdct_data
// follows mdct_addr by one cycle. mdct_start pulses one cycle after sb_done,
// with mdct_channel holding the channel of that granule.
// The previous/current buffers and the 32x18 shapes are the published
// architecture; the bank swap, the address formats and the 2304-cycle clear
// after reset (so the first granule sees a zero previous granule) are this
// design's choices.
module enc_if2
  import mp3_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  addr_t   sb_addr,
  input  sample_t sb_data,
  input  logic    sb_we,
  input  logic    sb_channel,
  input  logic    sb_done,
  input  addr_t   mdct_addr,
  output sample_t mdct_data,
  output logic    mdct_channel,
  output logic    mdct_start
);

  localparam int DEPTH = 2 * 2 * GRAN;   // channel x bank x 576

  sample_t mem [DEPTH];
  logic [1:0]  wbank;                    // bank written next, per channel
  logic        clearing;
  logic [11:0] clr;

  // buffer index of (channel, bank, subband, time)
  function automatic logic [11:0] idx(logic c, logic b, logic [4:0] s, logic [4:0] t);
    return 12'((32'({c, b}) * GRAN) + 32'(s) * NGRAN + 32'(t));
  endfunction

  logic [11:0] wa, ra;
  logic [5:0]  mn;
  always_comb begin
    wa = idx(sb_channel, wbank[sb_channel], sb_addr[4:0], sb_addr[9:5]);
    mn = mdct_addr[5:0];
    if (mn < 6'd18) ra = idx(mdct_channel,  wbank[mdct_channel], mdct_addr[10:6], 5'(mn));
    else            ra = idx(mdct_channel, ~wbank[mdct_channel], mdct_addr[10:6], 5'(mn - 6'd18));
  end

  always_ff @(posedge clk) begin
    if (clearing)   mem[clr] <= '0;
    else if (sb_we) mem[wa]  <= sb_data;
    mdct_data <= mem[ra];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing     <= 1'b1;
      clr          <= '0;
      wbank        <= '0;
      mdct_channel <= 1'b0;
      mdct_start   <= 1'b0;
    end else begin
      if (clearing) begin
        clr <= clr + 1'b1;
        if (32'(clr) == DEPTH - 1) clearing <= 1'b0;
      end
      mdct_start <= sb_done;
      if (sb_done) begin
        wbank[sb_channel] <= ~wbank[sb_channel];
        mdct_channel      <= sb_channel;
      end
    end
  end

endmodule
