// piso_register: 16-bit parallel-in serial-out shift register (circuit under test 3).
//
// load_i copies d_i into the register; otherwise shift_i moves it one place
// toward the MSB, filling with zero. The serial output so_o is the MSB, so a
// word loaded at edge t appears MSB first on so_o from cycle t+1 to t+16.
// load_i has priority over shift_i; clr_i and the asynchronous reset zero the
// register. Bit order, priority and fill value are this implementation's
// choices; the design names the block only.
module piso_register
  import bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr_i,
  input  logic  load_i,
  input  logic  shift_i,
  input  word_t d_i,
  output logic  so_o
);
  word_t q_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q_q <= '0;
    else if (clr_i)   q_q <= '0;
    else if (load_i)  q_q <= d_i;
    else if (shift_i) q_q <= {q_q[DATA_W-2:0], 1'b0};
  end

  assign so_o = q_q[DATA_W-1];
endmodule
