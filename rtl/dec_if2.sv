// dec_if2: "interface 2" of the MP3 decoder, the static point-to-point link
// from the IMDCT to the synthesis filter bank.
//
// The IMDCT delivers a granule as 32 packets of 18 time samples, one per
// subband (imdct_addr = {subband[9:5], i[4:0]}); the synthesis filter bank
// reads 18 packets of 32 subband samples (sb_addr = {t[9:5], subband[4:0]}).
// A single 32x18 buffer does the conversion: the controller turns both
// addresses into the buffer index 18*subband + t and drives the buffer's
// address, read/write and enable. The synthesis bank starts only when the
// IMDCT is done, so one buffer suffices. The channel is passed on; maxb,
// block_type and mix_block_flag are not, since the filter bank does not need
// them. sb_start pulses one cycle after imdct_done; sb_data follows sb_addr
// by one cycle. The buffer, its shape and the passed signals follow the
// published architecture; the address formats are this design's choice.
module dec_if2
  import mp3_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  addr_t   imdct_addr,
  input  sample_t imdct_data,
  input  logic    imdct_we,
  input  logic    imdct_channel,
  input  logic    imdct_done,
  input  addr_t   sb_addr,
  output sample_t sb_data,
  output logic    sb_channel,
  output logic    sb_start
);

  sample_t buffer [GRAN];

  // controller: address, read/write and enable of the buffer
  logic [9:0] address;
  logic       rw;          // 1 = write (IMDCT side), 0 = read
  logic       enable;
  always_comb begin
    rw      = imdct_we;
    enable  = 1'b1;
    if (rw) address = 10'(32'(imdct_addr[9:5]) * NGRAN + 32'(imdct_addr[4:0]));
    else    address = 10'(32'(sb_addr[4:0])    * NGRAN + 32'(sb_addr[9:5]));
  end

  always_ff @(posedge clk) begin
    if (enable && rw)  buffer[address] <= imdct_data;
    if (enable && !rw) sb_data <= buffer[address];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb_channel <= 1'b0;
      sb_start   <= 1'b0;
    end else begin
      sb_start <= imdct_done;
      if (imdct_we) sb_channel <= imdct_channel;
    end
  end

endmodule
