// clk_sel: the flexible clock of an MP3 IP. A two-bit control word, captured
// in a register on the system clock, selects the IP clock source (bit 0:
// 0 = system clock, 1 = external clock) and enables it (bit 1). The selected
// clock is gated with an enable that is re-timed on the falling edge of that
// clock, so a change of the enable never shortens a high phase.
//
// The source selection and the gating follow the published interface figure;
// the bit assignment of the control word and the falling-edge enable flop are
// this design's choices. The source multiplexer itself is not glitch-free:
// change bit 0 only while bit 1 (enable) is low.
// gclk is a derived clock by intent (the IP runs on it).
module clk_sel (
  input  logic       sys_clk,
  input  logic       ext_clk,
  input  logic       rst_n,
  input  logic [1:0] control_word,
  output logic       gclk
);

  logic [1:0] ctrl_q;
  logic       mclk, en_q;

  always_ff @(posedge sys_clk or negedge rst_n)
    if (!rst_n) ctrl_q <= 2'b10;          // system clock, enabled
    else        ctrl_q <= control_word;

  assign mclk = ctrl_q[0] ? ext_clk : sys_clk;

  always_ff @(negedge mclk or negedge rst_n)
    if (!rst_n) en_q <= 1'b1;
    else        en_q <= ctrl_q[1];

  assign gclk = mclk & en_q;

endmodule
