// status_display: BCD and LED status display of the board prototype.
//
// In normal mode the six digits show the accumulated photon count in decimal
// (16-bit binary to five BCD digits by shift-and-add-3, top digit zero). In
// test mode they show which circuit is or was last tested: 0020 for CUT-1,
// 0200 for CUT-2 and 2000 for CUT-3 on the four right-hand digits, all zero
// before the first test. LEDR[1], LEDR[5] and LEDR[8] (counting from the right,
// from 0) light when CUT-1, CUT-2 and CUT-3 have passed. Those digit patterns
// and LED positions are the design's; the seven-segment code (active-low,
// segment order g..a, as on common FPGA boards) and the other LEDs being off
// are this implementation's. Purely combinational. digit_o[0] is the
// rightmost digit.
module status_display
  import bist_pkg::*;
(
  input  logic       test_mode_i,
  input  cut_t       cut_i,
  input  logic       cut_valid_i,
  input  logic [2:0] pass_i,
  input  word_t      count_i,
  output logic [3:0] digit_o [6],
  output logic [6:0] hex_n_o [6],
  output logic [9:0] ledr_o
);
  logic [19:0] bcd;

  // Shift-and-add-3: before each shift, any BCD digit of 5 or more gets 3 added.
  always_comb begin
    bcd = '0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      for (int d = 0; d < 5; d++) begin
        if (bcd[4*d +: 4] >= 4'd5) bcd[4*d +: 4] = bcd[4*d +: 4] + 4'd3;
      end
      bcd = {bcd[18:0], count_i[i]};
    end
  end

  always_comb begin
    for (int d = 0; d < 6; d++) digit_o[d] = 4'd0;
    if (!test_mode_i) begin
      for (int d = 0; d < 5; d++) digit_o[d] = bcd[4*d +: 4];
    end else if (cut_valid_i) begin
      unique case (cut_i)
        CUT_1:   digit_o[1] = 4'd2;
        CUT_2:   digit_o[2] = 4'd2;
        CUT_3:   digit_o[3] = 4'd2;
        default: ;
      endcase
    end
  end

  function automatic logic [6:0] seg7_n(logic [3:0] v);
    unique case (v)
      4'd0:    return 7'b1000000;
      4'd1:    return 7'b1111001;
      4'd2:    return 7'b0100100;
      4'd3:    return 7'b0110000;
      4'd4:    return 7'b0011001;
      4'd5:    return 7'b0010010;
      4'd6:    return 7'b0000010;
      4'd7:    return 7'b1111000;
      4'd8:    return 7'b0000000;
      4'd9:    return 7'b0010000;
      default: return 7'b1111111;
    endcase
  endfunction

  always_comb begin
    for (int d = 0; d < 6; d++) hex_n_o[d] = seg7_n(digit_o[d]);
  end

  always_comb begin
    ledr_o    = '0;
    ledr_o[1] = pass_i[0];
    ledr_o[5] = pass_i[1];
    ledr_o[8] = pass_i[2];
  end
endmodule
