// accumulation_block: adds the shifted partial products into the product.
//
// Partial product i (N+1 digits) is shifted left by i digits into a 2N-digit
// field, and the N shifted terms are summed by a balanced binary tree of BCD
// adders: N/2 additions in the first level, N/4 in the next, and so on, for
// ceil(log2 N) levels (three for N = 8). Tree leaves beyond N are zero. The
// product of two N-digit numbers always fits in 2N digits, so the carry out
// of every adder is zero.
//
// Interface: pp[i] is the partial product of multiplier digit i; p is the
// 2N-digit BCD product. Purely combinational.
//
// Shift-and-add of the partial products follows the reference architecture;
// the balanced tree and the uniform 2N-digit adder width are this design's
// choices.
module accumulation_block
  import bcd_pkg::*;
#(
  parameter int unsigned N    = DIGITS,     // digits of each operand
  parameter adder_kind_e KIND = ADDER_RDA   // adder style
) (
  input  logic [N-1:0][4*N+3:0] pp,
  output logic [8*N-1:0]        p
);

  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1;  // tree levels
  localparam int unsigned NL = 1 << LV;                  // leaves
  localparam int unsigned W  = 8*N;                      // product width

  logic [LV:0][NL-1:0][W-1:0] node;

  // leaves: shifted partial products
  always_comb begin
    node[0] = '0;
    for (int unsigned i = 0; i < N; i++) node[0][i] = W'(pp[i]) << (4*i);
  end

  for (genvar l = 1; l <= LV; l++) begin : g_level
    for (genvar j = 0; j < NL; j++) begin : g_node
      if (j < (NL >> l)) begin : g_add
        logic unused_cout;
        bcd_adder #(.N(2*N), .KIND(KIND)) u_add (
          .a(node[l-1][2*j]), .b(node[l-1][2*j+1]), .cin(1'b0),
          .s(node[l][j]), .cout(unused_cout));
      end else begin : g_zero
        assign node[l][j] = '0;
      end
    end
  end

  assign p = node[LV][0];

endmodule
