// bcd_adder_ra: regular BCD adder (ripple carry).
//
// Adds two N-digit BCD numbers and a carry-in. Each digit is a 4-bit binary
// ripple adder built from full-adder equations, followed by the usual decimal
// correction: when the 5-bit digit sum exceeds 9, 6 is added and a decimal
// carry goes to the next digit. The decimal carry then ripples from the least
// to the most significant digit, so the delay grows linearly with N. This is
// the slowest of the three adder styles. Operands must be valid BCD.
//
// Interface: a, b are N-digit BCD, cin the carry-in; s is the N-digit BCD sum
// and cout the decimal carry out of the top digit. Purely combinational.
//
// The ripple-carry organisation follows the reference architecture; the
// digit-level +6 correction is the standard one.
module bcd_adder_ra #(
  parameter int unsigned N = 8  // number of BCD digits
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic           cin,
  output logic [4*N-1:0] s,
  output logic           cout
);

  logic [N:0] c;  // decimal carry into each digit

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_digit
    logic [4:0] bc;  // bit carries inside the digit
    logic [4:0] z;   // binary digit sum

    // 4-bit ripple-carry binary addition of one digit
    assign bc[0] = c[i];
    for (genvar k = 0; k < 4; k++) begin : g_fa
      assign z[k]    = a[4*i+k] ^ b[4*i+k] ^ bc[k];
      assign bc[k+1] = (a[4*i+k] & b[4*i+k]) | (bc[k] & (a[4*i+k] ^ b[4*i+k]));
    end
    assign z[4] = bc[4];

    // decimal correction: a sum of 10..19 gets +6 and raises the carry
    assign c[i+1]      = z[4] | (z[3] & (z[2] | z[1]));
    assign s[4*i +: 4] = z[3:0] + (c[i+1] ? 4'd6 : 4'd0);
  end

  assign cout = c[N];

endmodule
