// evaluation_block: multiplicand multiples 1A..5A.
//
// Takes the N-digit BCD multiplicand A and produces the five multiples a
// signed-digit multiplier digit can ask for. Each is N+1 digits wide, which
// holds 5 * (10^N - 1). The multiples are made with BCD adders only:
//   2A = A + A,  3A = 2A + A,  4A = 2A + 2A,  5A = 4A + A
// so 3A and 4A are formed in parallel after 2A, and 5A follows 4A.
//
// Interface: a is the N-digit BCD multiplicand; m[k] is k*A for k = 1..5 in
// BCD. Purely combinational.
//
// The set of multiples and their being made by BCD adders follow the
// reference architecture; the particular adder graph is this design's choice.
module evaluation_block
  import bcd_pkg::*;
#(
  parameter int unsigned N    = DIGITS,     // digits of the multiplicand
  parameter adder_kind_e KIND = ADDER_RDA   // adder style
) (
  input  logic [4*N-1:0]                 a,
  output logic [NUM_MULTIPLES:1][4*N+3:0] m
);

  localparam int unsigned W = 4*(N+1);

  logic [W-1:0] m1, m2, m3, m4, m5;
  logic         unused_cout2, unused_cout3, unused_cout4, unused_cout5;

  assign m1 = {4'd0, a};

  bcd_adder #(.N(N+1), .KIND(KIND)) u_add2 (
    .a(m1), .b(m1), .cin(1'b0), .s(m2), .cout(unused_cout2));
  bcd_adder #(.N(N+1), .KIND(KIND)) u_add3 (
    .a(m2), .b(m1), .cin(1'b0), .s(m3), .cout(unused_cout3));
  bcd_adder #(.N(N+1), .KIND(KIND)) u_add4 (
    .a(m2), .b(m2), .cin(1'b0), .s(m4), .cout(unused_cout4));
  bcd_adder #(.N(N+1), .KIND(KIND)) u_add5 (
    .a(m4), .b(m1), .cin(1'b0), .s(m5), .cout(unused_cout5));

  assign m[1] = m1;
  assign m[2] = m2;
  assign m[3] = m3;
  assign m[4] = m4;
  assign m[5] = m5;

endmodule
