// mp3_codec_top: hardware of the real-time MP3 codec -- the encode IP and
// the decode IP side by side, each with its own PVCI port and its own
// flexible clock.
//
// Each IP runs on a clock chosen by a two-bit control word (bit 0: system
// or external clock, bit 1: enable); see clk_sel. The PVCI initiator of an
// IP must be clocked by that IP's clock (enc_clk / dec_clk are brought out
// for it). The software part of the codec (psychoacoustics, quantisation,
// Huffman coding, bitstream packing and unpacking, stereo processing,
// reordering and decoder alias reduction) runs on the host and talks to the
// IPs through these ports.
module mp3_codec_top
  import mp3_pkg::*;
(
  input  logic       sys_clk,
  input  logic       ext_clk,
  input  logic       rst_n,
  input  logic [1:0] enc_control_word,
  input  logic [1:0] dec_control_word,
  output logic       enc_clk,
  output logic       dec_clk,
  input  pvci_req_t  enc_req,
  output pvci_rsp_t  enc_rsp,
  input  pvci_req_t  dec_req,
  output pvci_rsp_t  dec_rsp
);

  clk_sel u_enc_clk (.sys_clk, .ext_clk, .rst_n, .control_word(enc_control_word), .gclk(enc_clk));
  clk_sel u_dec_clk (.sys_clk, .ext_clk, .rst_n, .control_word(dec_control_word), .gclk(dec_clk));

  mp3_encoder u_enc (.clk(enc_clk), .rst_n, .req(enc_req), .rsp(enc_rsp));
  mp3_decoder u_dec (.clk(dec_clk), .rst_n, .req(dec_req), .rsp(dec_rsp));

endmodule
