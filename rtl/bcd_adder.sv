// bcd_adder: N-digit BCD adder whose implementation style is a parameter.
//
// Every addition in the multiplier goes through this module, so the whole
// multiplier can be built with the ripple-carry (ADDER_RA), carry-lookahead
// (ADDER_MA) or Kogge-Stone (ADDER_RDA) BCD adder by changing one parameter.
// All three give the same sum; they differ only in delay and area.
//
// Interface: a, b are N-digit BCD, cin the carry-in; s is the N-digit BCD sum
// and cout the decimal carry out. Purely combinational.
module bcd_adder
  import bcd_pkg::*;
#(
  parameter int unsigned N    = 8,          // number of BCD digits
  parameter adder_kind_e KIND = ADDER_RDA   // adder style
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic           cin,
  output logic [4*N-1:0] s,
  output logic           cout
);

  if (KIND == ADDER_RA) begin : g_ra
    bcd_adder_ra #(.N(N)) u_add (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end else if (KIND == ADDER_MA) begin : g_ma
    bcd_adder_ma #(.N(N)) u_add (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end else begin : g_rda
    bcd_adder_rda #(.N(N)) u_add (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  end

endmodule
