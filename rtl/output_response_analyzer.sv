// output_response_analyzer: signature analyzer for the PISO serial response.
//
// A 16-bit serial-input signature register: each cycle with en_i high it takes
// one LFSR step and XORs the serial input si_i into bit 0, so the whole bit
// stream of the CUT-3 test is compacted into q_o ("Q3"). clr_i ("rst3") and the
// asynchronous reset zero it. The design gives only the block's role; the
// serial signature register and its polynomial are this implementation's.
module output_response_analyzer
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr_i,
  input  logic  en_i,
  input  logic  si_i,
  output word_t q_o
);
  word_t q_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q_q <= '0;
    else if (clr_i) q_q <= '0;
    else if (en_i)  q_q <= lfsr_next(q_q) ^ {{(DATA_W-1){1'b0}}, si_i};
  end

  assign q_o = q_q;
endmodule
