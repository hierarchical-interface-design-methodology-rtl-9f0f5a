// mp3_decoder: the decode IP -- the hardware part of the MP3 decoder behind
// one PVCI target.
//
//   PVCI -> pvci_target (interface 1, with parameter word) -> imdct (module A)
//        -> dec_if2 (interface 2) -> synthesis_fb (module B) -> pvci_target
//
// The host writes a granule of 576 spectral lines of one channel, the
// parameter word (channel, maxb, block_type, mix_block_flag), the window
// table once, and START; the IMDCT writes 32 packets of 18 time samples,
// interface 2 regroups them into 18 packets of 32, the synthesis filter bank
// writes 576 PCM samples back to the output buffer and raises DONE. Only the
// channel travels on past the IMDCT. Everything runs on the IP clock clk.
module mp3_decoder
  import mp3_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  pvci_req_t req,
  output pvci_rsp_t rsp
);

  logic       mp3_start, mp3_done;
  dec_param_t param;
  addr_t      in_addr, out_addr, imdct_addr, subband_addr;
  sample_t    in_data, out_data, imdct_data, subband_data;
  logic       out_we, imdct_we, imdct_channel, imdct_done;
  logic       subband_channel, subband_start;
  logic       coef_we;
  logic [8:0] coef_addr;
  coef_t      coef_data;

  pvci_target #(.HAS_PARAMS(1'b1)) u_vci (
    .clk, .rst_n, .req, .rsp,
    .mp3_start, .param, .in_addr, .in_data,
    .out_addr, .out_data, .out_we, .mp3_done,
    .coef_we, .coef_addr, .coef_data
  );

  imdct u_imdct (
    .clk, .rst_n, .start(mp3_start), .param,
    .in_addr, .in_data,
    .out_addr(imdct_addr), .out_data(imdct_data), .out_we(imdct_we),
    .out_channel(imdct_channel), .done(imdct_done)
  );

  dec_if2 u_if2 (
    .clk, .rst_n,
    .imdct_addr, .imdct_data, .imdct_we, .imdct_channel, .imdct_done,
    .sb_addr(subband_addr), .sb_data(subband_data),
    .sb_channel(subband_channel), .sb_start(subband_start)
  );

  synthesis_fb u_subband (
    .clk, .rst_n, .start(subband_start), .channel(subband_channel),
    .in_addr(subband_addr), .in_data(subband_data),
    .out_addr, .out_data, .out_we, .done(mp3_done),
    .coef_we, .coef_addr, .coef_data
  );

endmodule
