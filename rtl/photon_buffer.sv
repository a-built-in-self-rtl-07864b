// photon_buffer: the 16-bit photon data buffer (circuit under test 1).
//
// A 16-bit register between the entrance multiplexer and the accumulator. It
// captures d_i on every cycle with en_i high and is cleared to zero by the
// synchronous clear clr_i ("rst1") or the asynchronous reset. In normal mode
// the datapath enables it once per sampling strobe; in the CUT-1 test it loads
// a TPG pattern every cycle. Output q_o is the register (one cycle latency).
// The design names the buffer and its width; the enable and clear are this
// implementation's choice.
module photon_buffer
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr_i,
  input  logic  en_i,
  input  word_t d_i,
  output word_t q_o
);
  word_t q_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q_q <= '0;
    else if (clr_i) q_q <= '0;
    else if (en_i)  q_q <= d_i;
  end

  assign q_o = q_q;
endmodule
