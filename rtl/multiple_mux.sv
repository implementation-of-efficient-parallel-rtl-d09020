// multiple_mux: selects one multiplicand multiple for one multiplier digit.
//
// An AND-OR selector: with one-hot selection bits from the recoder, the output
// is the multiple |d|*A for the digit's magnitude |d| in 1..5, and zero when
// no selection bit is set. The sign is applied afterwards by the partial
// product block, so this output is always the magnitude.
//
// Interface: m[k] = k*A (W bits each), sel one-hot over k = 1..5, y the
// selected multiple. Purely combinational.
//
// Selection by one-hot bits follows the reference architecture; applying the
// sign after the selector, not in it, is this design's choice.
module multiple_mux
  import bcd_pkg::*;
#(
  parameter int unsigned W = 4*(DIGITS+1)  // width of one multiple in bits
) (
  input  logic [NUM_MULTIPLES:1][W-1:0] m,
  input  logic [NUM_MULTIPLES:1]        sel,
  output logic [W-1:0]                  y
);

  always_comb begin
    y = '0;
    for (int unsigned k = 1; k <= NUM_MULTIPLES; k++) y |= m[k] & {W{sel[k]}};
  end

  // The recoder never raises more than one selection bit.
  always_comb assert ($onehot0(sel)) else $error("multiple_mux: selection not one-hot");

endmodule
