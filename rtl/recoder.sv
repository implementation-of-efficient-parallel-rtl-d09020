// recoder: signed-digit radix-10 recoding of the multiplier digits.
//
// Each BCD digit of the multiplier B is mapped, on its own and without any
// carry between digits, to a sign bit and a magnitude of 0..5 held one-hot in
// five selection bits:
//   0..5  ->  +0..+5   (sign 0, no recoding)
//   6..9  ->  -4..-1   (sign 1, magnitude 10 - digit)
// A negative digit stands for digit - 10; the partial product block adds back
// the 10 by using 10*A, so no transfer digit travels to the next position.
// Codes 10..15 are not BCD; they give sign 0 and no selection (a zero
// multiple).
//
// Interface: b is the N-digit BCD multiplier; neg[i] is the sign of digit i
// and sel[i][k] is set when its magnitude is k (k = 1..5); sel[i] is all zero
// for a zero digit. Purely combinational.
//
// The digit mapping and the sign-plus-five-one-hot code follow the reference
// architecture. Keeping 5 as +5 (it could be -5 with the same result) and the
// handling of non-BCD codes are this design's choices.
module recoder
  import bcd_pkg::*;
#(
  parameter int unsigned N = DIGITS  // digits of the multiplier
) (
  input  logic [4*N-1:0]                         b,
  output logic [N-1:0]                           neg,
  output logic [N-1:0][NUM_MULTIPLES:1]          sel
);

  always_comb begin
    bcd_digit_t d;
    for (int unsigned i = 0; i < N; i++) begin
      d      = b[4*i +: 4];
      neg[i] = (d >= 4'd6) && (d <= 4'd9);
      sel[i] = '0;
      unique case (d)
        4'd1, 4'd9: sel[i][1] = 1'b1;
        4'd2, 4'd8: sel[i][2] = 1'b1;
        4'd3, 4'd7: sel[i][3] = 1'b1;
        4'd4, 4'd6: sel[i][4] = 1'b1;
        4'd5:       sel[i][5] = 1'b1;
        default:    sel[i]    = '0;
      endcase
    end
  end

endmodule
