// decimal_multiplier: parallel BCD multiplier, N x N digits (8 x 8 = 32 x 32 bits).
//
// The product P = A * B is formed in one combinational pass:
//   evaluation      A -> multiples 1A..5A, each N+1 digits
//   recoder         every digit of B -> sign + one-hot magnitude 0..5
//                   (6..9 become -4..-1)
//   multiple_mux    one per digit of B: picks |d|*A            (P1..PN)
//   partial_product one per digit of B: b_i*A = |d|*A, or
//                   10A - |d|*A for a negative digit           (PP1..PPN)
//   accumulation    shifts PP_i left by i digits and sums the
//                   terms in a binary tree of BCD adders       -> P, 2N digits
// All partial products are generated at the same time, which is what makes the
// multiplier parallel. Every adder in it has the style chosen by KIND: ripple
// carry, carry lookahead or Kogge-Stone (the default and the fastest).
//
// Besides the product, the multiples, the selected magnitudes and the partial
// products are brought out so that they can be observed.
//
// Interface: a (multiplicand), b (multiplier) are N-digit BCD; p is the
// 2N-digit BCD product. Inputs must be valid BCD. There is no clock: p is valid
// one combinational delay after a and b settle.
//
// The block structure, operand sizes and adder styles follow the reference
// architecture. Leaving out clock and registers, and bringing the
// intermediate signals out as ports, are this design's choices.
module decimal_multiplier
  import bcd_pkg::*;
#(
  parameter int unsigned N    = DIGITS,     // digits per operand (8 = 32 bits)
  parameter adder_kind_e KIND = ADDER_RDA   // adder style for every adder
) (
  input  logic [4*N-1:0]                 a,
  input  logic [4*N-1:0]                 b,
  output logic [8*N-1:0]                 p,
  output logic [NUM_MULTIPLES:1][4*N+3:0] mult,  // 1A..5A
  output logic [N-1:0][4*N+3:0]          sel_mult, // selected |d|*A per digit
  output logic [N-1:0][4*N+3:0]          pp        // partial products b_i*A
);

  logic [N-1:0]                  neg;
  logic [N-1:0][NUM_MULTIPLES:1] sel;

  evaluation_block #(.N(N), .KIND(KIND)) u_ev (.a(a), .m(mult));

  recoder #(.N(N)) u_re (.b(b), .neg(neg), .sel(sel));

  for (genvar i = 0; i < N; i++) begin : g_digit
    multiple_mux #(.W(4*N+4)) u_mu (.m(mult), .sel(sel[i]), .y(sel_mult[i]));
    partial_product #(.N(N), .KIND(KIND)) u_pp (
      .a(a), .mag(sel_mult[i]), .neg(neg[i]), .pp(pp[i]));
  end

  accumulation_block #(.N(N), .KIND(KIND)) u_ac (.pp(pp), .p(p));

endmodule
