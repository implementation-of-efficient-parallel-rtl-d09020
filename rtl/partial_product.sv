// partial_product: forms the partial product b_i * A of one multiplier digit.
//
// For a positive recoded digit the selected multiple |d|*A already is the
// partial product. For a negative digit d = b_i - 10 the partial product is
//   b_i * A = 10*A - |d|*A,
// computed as a ten's-complement subtraction with one BCD adder: 10*A (A
// shifted up one digit) plus the nine's complement of |d|*A plus a carry-in of
// 1, keeping N+1 digits. The result is never negative and fits in N+1 digits,
// so every partial product is a plain unsigned BCD number.
//
// Interface: a is the N-digit multiplicand, mag the (N+1)-digit selected
// multiple, neg the digit's sign; pp is the (N+1)-digit partial product.
// Purely combinational.
//
// That negative multiples come from a complement and that every partial
// product equals b_i * A follow the reference architecture; the ten's
// complement through an adder carry-in is this design's choice.
module partial_product
  import bcd_pkg::*;
#(
  parameter int unsigned N    = DIGITS,     // digits of the multiplicand
  parameter adder_kind_e KIND = ADDER_RDA   // adder style
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N+3:0] mag,
  input  logic           neg,
  output logic [4*N+3:0] pp
);

  logic [4*N+3:0] x, y;
  logic           unused_cout;

  always_comb begin
    for (int unsigned i = 0; i <= N; i++)
      x[4*i +: 4] = neg ? nines(mag[4*i +: 4]) : mag[4*i +: 4];
    y = neg ? {a, 4'd0} : '0;
  end

  bcd_adder #(.N(N+1), .KIND(KIND)) u_add (
    .a(y), .b(x), .cin(neg), .s(pp), .cout(unused_cout));

endmodule
