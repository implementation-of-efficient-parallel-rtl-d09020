// bcd_adder_rda: reduced delay BCD adder (Kogge-Stone prefix network).
//
// Adds two N-digit BCD numbers and a carry-in in three stages.
//  1. Pre-processing: 6 is added to every digit of a (a digit of 0..9 becomes
//     6..15, still four bits), so that a binary carry out of a digit position
//     appears exactly when the decimal digit sum a + b + carry-in reaches 10.
//     Bit generate g = a' & b and propagate p = a' ^ b are formed for all 4N
//     bits; the carry-in enters as an extra generate bit below bit 0.
//  2. Carry network: a Kogge-Stone parallel-prefix tree of ceil(log2(4N+1))
//     levels computes the carry into every bit at once.
//  3. Post-processing: sum bits are p ^ carry. A digit that produced no
//     decimal carry still holds the +6 bias, which is removed by adding 10
//     modulo 16.
// The carry network depth grows with log2 of the width rather than linearly,
// which makes this the fastest of the three adder styles.
//
// Interface: a, b are N-digit BCD, cin the carry-in; s is the N-digit BCD sum
// and cout the decimal carry out of the top digit. Purely combinational.
//
// The Kogge-Stone network and the three-stage split follow the reference
// architecture; the +6 bias and its removal are this design's way of making a
// binary prefix network add BCD.
module bcd_adder_rda #(
  parameter int unsigned N = 8  // number of BCD digits
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic           cin,
  output logic [4*N-1:0] s,
  output logic           cout
);

  localparam int unsigned W = 4*N + 1;      // prefix positions: carry-in + 4N bits
  localparam int unsigned L = $clog2(W);    // Kogge-Stone levels

  logic [4*N-1:0] ab;               // a with +6 added to every digit
  logic [4*N-1:0] pb;               // bit propagate
  logic [L:0][W-1:0] gk, pk;        // generate / propagate after each level
  logic [4*N:0]   c;                // carry into each bit (c[4N] = carry out)

  // Stage 1: pre-processing
  always_comb begin
    for (int unsigned i = 0; i < N; i++) ab[4*i +: 4] = a[4*i +: 4] + 4'd6;
    pb = ab ^ b;
    gk[0][0] = cin;
    pk[0][0] = 1'b0;
    for (int unsigned k = 0; k < 4*N; k++) begin
      gk[0][k+1] = ab[k] & b[k];
      pk[0][k+1] = pb[k];
    end
  end

  // Stage 2: Kogge-Stone carry network
  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar k = 0; k < W; k++) begin : g_node
      if (k >= D) begin : g_black
        assign gk[l+1][k] = gk[l][k] | (pk[l][k] & gk[l][k-D]);
        assign pk[l+1][k] = pk[l][k] & pk[l][k-D];
      end else begin : g_pass
        assign gk[l+1][k] = gk[l][k];
        assign pk[l+1][k] = pk[l][k];
      end
    end
  end

  // Stage 3: post-processing
  always_comb begin
    logic [3:0] t;
    c = gk[L];  // group generate over positions 0..k = carry into bit k
    for (int unsigned i = 0; i < N; i++) begin
      t = pb[4*i +: 4] ^ c[4*i +: 4];
      s[4*i +: 4] = c[4*i+4] ? t : t + 4'd10;  // remove the +6 bias
    end
    cout = c[4*N];
  end

endmodule
