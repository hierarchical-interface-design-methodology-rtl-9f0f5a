// mp3_encoder: the encode IP -- the hardware part of the MP3 encoder behind
// one PVCI target.
//
//   PVCI -> pvci_target (interface 1) -> analysis_fb (module A)
//        -> enc_if2 (interface 2) -> mdct_ar (module B) -> pvci_target
//
// The host writes a granule of 576 PCM samples of one channel, the window
// table once, and START; the filter bank produces 18 packets of 32 subband
// samples, interface 2 regroups them with the previous granule into 32
// packets of 36, the MDCT with alias reduction writes 576 frequency lines
// back to the output buffer and raises DONE. One granule takes about
// 17300 + 12875 cycles after START. Everything runs on the IP clock clk.
module mp3_encoder
  import mp3_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  pvci_req_t req,
  output pvci_rsp_t rsp
);

  logic       mp3_start, mp3_done;
  dec_param_t param;
  addr_t      in_addr, out_addr, subband_addr, mdct_addr;
  sample_t    in_data, out_data, subband_data, mdct_data;
  logic       out_we, subband_we, subband_channel, subband_done;
  logic       mdct_channel, mdct_start, out_channel;
  logic       coef_we;
  logic [8:0] coef_addr;
  coef_t      coef_data;

  pvci_target #(.HAS_PARAMS(1'b0)) u_vci (
    .clk, .rst_n, .req, .rsp,
    .mp3_start, .param, .in_addr, .in_data,
    .out_addr, .out_data, .out_we, .mp3_done,
    .coef_we, .coef_addr, .coef_data
  );

  analysis_fb u_subband (
    .clk, .rst_n, .start(mp3_start), .channel(param.channel),
    .in_addr, .in_data,
    .sb_addr(subband_addr), .sb_data(subband_data), .sb_we(subband_we),
    .sb_channel(subband_channel), .done(subband_done),
    .coef_we, .coef_addr, .coef_data
  );

  enc_if2 u_if2 (
    .clk, .rst_n,
    .sb_addr(subband_addr), .sb_data(subband_data), .sb_we(subband_we),
    .sb_channel(subband_channel), .sb_done(subband_done),
    .mdct_addr, .mdct_data, .mdct_channel, .mdct_start
  );

  mdct_ar u_mdct (
    .clk, .rst_n, .start(mdct_start), .channel(mdct_channel),
    .in_addr(mdct_addr), .in_data(mdct_data),
    .out_addr, .out_data, .out_we, .out_channel, .done(mp3_done)
  );

endmodule
