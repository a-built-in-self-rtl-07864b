// clock_divider: timing base of the photon counting chain.
//
// A free-running 4-bit counter produces one-cycle strobes every 8 and every 16
// clock cycles (tick8_o, tick16_o) and the matching divided square waves
// (div8_o = count bit 2, div16_o = count bit 3). The design names a divide-by-8
// and a divide-by-16 output followed by a select mux; here they are clock-enable
// strobes for the single system clock rather than derived clocks, which is this
// implementation's choice. Both strobes are high in the cycle where the count
// is 7 (tick8) or 15 (tick8 and tick16). Asynchronous active-low reset to 0.
module clock_divider (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] count_o,
  output logic       tick8_o,
  output logic       tick16_o,
  output logic       div8_o,
  output logic       div16_o
);
  logic [3:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= cnt_q + 4'd1;
  end

  assign count_o  = cnt_q;
  assign tick8_o  = (cnt_q[2:0] == 3'b111);
  assign tick16_o = (cnt_q == 4'b1111);
  assign div8_o   = cnt_q[2];
  assign div16_o  = cnt_q[3];
endmodule
