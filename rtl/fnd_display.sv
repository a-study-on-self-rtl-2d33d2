// fnd_display -- seven-segment (FND) decoding of the timer's four stages.
//
// The timer value is shown on six FND digits: digit 0 the hundredths, digit 1
// the tenths, digits 2/3 the units/tens of the seconds and digits 4/5 the
// units/tens of the minutes. Seconds and minutes (0..59) are split into two
// decimal digits by dividing by the constant 10. Each digit is decoded into a
// segment pattern {g,f,e,d,c,b,a}, active high. Digit order, segment order and
// polarity are this implementation's choices; the board's FND drive (common
// anode or cathode, multiplexing) is outside this block.
// Purely combinational.
module fnd_display
  import self_repair_pkg::*;
(
  input  logic [CNT_W-1:0] hundredths,
  input  logic [CNT_W-1:0] tenths,
  input  logic [CNT_W-1:0] seconds,
  input  logic [CNT_W-1:0] minutes,
  output logic [5:0][6:0]  seg        // seg[d] = {g,f,e,d,c,b,a} of digit d
);

  function automatic logic [6:0] seg7(input logic [3:0] v);
    unique case (v)
      4'd0:    seg7 = 7'b011_1111;
      4'd1:    seg7 = 7'b000_0110;
      4'd2:    seg7 = 7'b101_1011;
      4'd3:    seg7 = 7'b100_1111;
      4'd4:    seg7 = 7'b110_0110;
      4'd5:    seg7 = 7'b110_1101;
      4'd6:    seg7 = 7'b111_1101;
      4'd7:    seg7 = 7'b000_0111;
      4'd8:    seg7 = 7'b111_1111;
      4'd9:    seg7 = 7'b110_1111;
      default: seg7 = 7'b100_0000;   // out of range: middle bar only
    endcase
  endfunction

  logic [CNT_W-1:0] sec_tens, min_tens;
  logic [3:0]       sec_ones, min_ones;

  always_comb begin
    sec_tens = seconds / CNT_W'(10);
    sec_ones = 4'(seconds - sec_tens * CNT_W'(10));
    min_tens = minutes / CNT_W'(10);
    min_ones = 4'(minutes - min_tens * CNT_W'(10));
    seg[0] = seg7((hundredths > CNT_W'(9)) ? 4'hF : hundredths[3:0]);
    seg[1] = seg7((tenths     > CNT_W'(9)) ? 4'hF : tenths[3:0]);
    seg[2] = seg7(sec_ones);
    seg[3] = seg7((sec_tens   > CNT_W'(9)) ? 4'hF : sec_tens[3:0]);
    seg[4] = seg7(min_ones);
    seg[5] = seg7((min_tens   > CNT_W'(9)) ? 4'hF : min_tens[3:0]);
  end

endmodule
