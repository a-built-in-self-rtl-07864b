// test_pattern_generator: pseudo-random test patterns (Q0) for the photon buffer.
//
// In test mode the entrance multiplexer replaces the sampled photon data with
// this generator's output. It is a 16-bit LFSR (polynomial in bist_pkg): a
// synchronous clear (clr_i, "rst0") loads SEED, and every cycle with en_i high
// it steps once. q_o is the register itself, so a pattern is valid the cycle
// after it is generated. Only the block's name and role come from the design;
// the LFSR form, polynomial and seed are this implementation's choice.
module test_pattern_generator
  import bist_pkg::*;
#(
  parameter word_t SEED = TPG_SEED
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr_i,
  input  logic  en_i,
  output word_t q_o
);
  word_t q_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q_q <= SEED;
    else if (clr_i) q_q <= SEED;
    else if (en_i)  q_q <= lfsr_next(q_q);
  end

  assign q_o = q_q;

  // A zero state would lock the LFSR.
  a_nonzero: assert property (@(posedge clk) disable iff (!rst_n) q_q != '0);
endmodule
