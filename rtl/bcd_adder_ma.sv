// bcd_adder_ma: modified BCD adder (carry lookahead with pre-correction).
//
// Adds two N-digit BCD numbers and a carry-in. The decimal correction is moved
// in front of the carry network, so the carries can be computed by an
// ordinary binary carry-lookahead scheme:
//  1. Pre-correction, per digit: the binary digit sum z = a + b (0..18) is
//     formed, and 6 (0110) is added when z >= 8, giving w. A digit sum of 10
//     or more now overflows four bits (w[4] = digit generate), a digit sum of 9
//     becomes 1111 (digit propagate: a carry-in ripples through), and a digit
//     sum of 8 becomes 1110.
//  2. Carry lookahead: digits are grouped in fours; inside a group every carry
//     is a two-level sum of products of the digit generate/propagate terms and
//     the group carry-in, and the group carries come from group
//     generate/propagate terms the same way.
//  3. Each digit adds its carry-in to w[3:0] modulo 16. The only results that
//     are not BCD are 1110 and 1111, which stand for 8 and 9 and are mapped
//     to them by clearing bits 2 and 1. No +6 correction follows the carries.
//
// Interface: a, b are N-digit BCD, cin the carry-in; s is the N-digit BCD sum
// and cout the decimal carry out of the top digit. Purely combinational.
//
// The pre-correction rule (+6 for sums of 8 or more, 1110/1111 read as 8/9)
// follows the reference architecture; the four-digit, two-level lookahead
// organisation is this design's choice.
module bcd_adder_ma #(
  parameter int unsigned N = 8  // number of BCD digits
) (
  input  logic [4*N-1:0] a,
  input  logic [4*N-1:0] b,
  input  logic           cin,
  output logic [4*N-1:0] s,
  output logic           cout
);

  localparam int unsigned GS = 4;                  // digits per lookahead group
  localparam int unsigned NG = (N + GS - 1) / GS;  // number of groups

  logic [3:0]    w [N];   // pre-corrected digit sum, low four bits
  logic [N-1:0]  g, p;    // digit generate / propagate
  logic [NG-1:0] gg, gp;  // group generate / propagate
  logic [NG:0]   gc;      // carry into each group
  logic [N:0]    c;       // carry into each digit

  // Step 1: pre-correction
  always_comb begin
    logic [4:0] z, zc;
    for (int unsigned i = 0; i < N; i++) begin
      z    = {1'b0, a[4*i +: 4]} + {1'b0, b[4*i +: 4]};
      zc   = (z >= 5'd8) ? z + 5'd6 : z;
      w[i] = zc[3:0];
      g[i] = zc[4];
      p[i] = &zc[3:0];
    end
  end

  // Step 2: two-level carry lookahead. term[j] is the generate of digit (or
  // group) j propagated through everything between j and the carry it feeds.
  for (genvar q = 0; q < NG; q++) begin : g_group
    localparam int unsigned LO = q*GS;
    localparam int unsigned HI = (q*GS + GS < N) ? q*GS + GS - 1 : N - 1;
    logic [HI:LO] term;
    for (genvar j = LO; j <= HI; j++) begin : g_term
      if (j == HI) begin : g_top
        assign term[j] = g[j];
      end else begin : g_mid
        assign term[j] = g[j] & (&p[HI:j+1]);
      end
    end
    assign gg[q] = |term;
    assign gp[q] = &p[HI:LO];
  end

  assign gc[0] = cin;
  for (genvar q = 1; q <= NG; q++) begin : g_gcarry
    logic [q-1:0] term;
    for (genvar r = 0; r < q; r++) begin : g_term
      if (r == q - 1) begin : g_top
        assign term[r] = gg[r];
      end else begin : g_mid
        assign term[r] = gg[r] & (&gp[q-1:r+1]);
      end
    end
    assign gc[q] = (|term) | (cin & (&gp[q-1:0]));
  end

  for (genvar i = 0; i < N; i++) begin : g_dcarry
    localparam int unsigned BASE = (i / GS) * GS;
    if (i == BASE) begin : g_first
      assign c[i] = gc[i / GS];
    end else begin : g_inner
      logic [i-1:BASE] term;
      for (genvar j = BASE; j < i; j++) begin : g_term
        if (j == i - 1) begin : g_top
          assign term[j] = g[j];
        end else begin : g_mid
          assign term[j] = g[j] & (&p[i-1:j+1]);
        end
      end
      assign c[i] = (|term) | (gc[i / GS] & (&p[i-1:BASE]));
    end
  end
  assign c[N] = gc[NG];

  // Step 3: add the carry-in; 1110 and 1111 stand for 8 and 9
  always_comb begin
    logic [3:0] t;
    for (int unsigned i = 0; i < N; i++) begin
      t = w[i] + {3'd0, c[i]};
      s[4*i +: 4] = (t[3:1] == 3'b111) ? {t[3], 2'b00, t[0]} : t;
    end
    cout = c[N];
  end

endmodule
