// tb_bcd_adder_ra: self-checking test of the regular (ripple-carry) BCD adder.
//
// Drives two 16-digit and two 9-digit instances (16 digits spans several
// lookahead groups and every prefix level; 9 digits is the width of the
// multiples) with corner cases (all nines plus carry-in, long propagate
// chains, zero) and random BCD operands. Every sum and carry-out is compared
// with the integer sum of the operands converted from BCD.
module tb_bcd_adder_ra;
  import tb_bcd_pkg::*;

  localparam int unsigned NW = 16;
  localparam int unsigned NN = 9;

  logic [4*NW-1:0] a16, b16, s16;
  logic [4*NN-1:0] a9, b9, s9;
  logic            cin, co16, co9;
  int unsigned     checks = 0, failures = 0;

  bcd_adder_ra #(.N(NW)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(co16));
  bcd_adder_ra #(.N(NN)) dut9  (.a(a9),  .b(b9),  .cin(cin), .s(s9),  .cout(co9));

  task automatic check16(input logic [63:0] x, input logic [63:0] y, input logic ci);
    longint unsigned ref_sum;
    logic [63:0]     ref_bcd;
    logic            ref_co;
    a16 = x; b16 = y; cin = ci;
    #1;
    ref_sum = from_bcd(x) + from_bcd(y) + longint'(ci);
    ref_co  = ref_sum >= pow10(16);
    ref_bcd = to_bcd(ref_sum % pow10(16));
    checks++;
    if (s16 !== ref_bcd || co16 !== ref_co) begin
      failures++;
      $display("FAIL N=16 %h + %h + %0d: got %b_%h, want %b_%h", x, y, ci, co16, s16, ref_co, ref_bcd);
    end
  endtask

  task automatic check9(input logic [63:0] x, input logic [63:0] y, input logic ci);
    longint unsigned ref_sum;
    logic [63:0]     ref_bcd;
    logic            ref_co;
    a9 = x[4*NN-1:0]; b9 = y[4*NN-1:0]; cin = ci;
    #1;
    ref_sum = from_bcd(x) + from_bcd(y) + longint'(ci);
    ref_co  = ref_sum >= pow10(NN);
    ref_bcd = to_bcd(ref_sum % pow10(NN));
    checks++;
    if (s9 !== ref_bcd[4*NN-1:0] || co9 !== ref_co) begin
      failures++;
      $display("FAIL N=9 %h + %h + %0d: got %b_%h, want %b_%h", x[35:0], y[35:0], ci, co9, s9, ref_co, ref_bcd[35:0]);
    end
  endtask

  initial begin
    a16 = '0; b16 = '0; a9 = '0; b9 = '0; cin = 1'b0;
    // corner cases
    check16('0, '0, 1'b0);
    check16('0, '0, 1'b1);
    check16(rand_bcd(16, 1), rand_bcd(16, 1), 1'b1);
    check16(rand_bcd(16, 1), '0, 1'b1);          // carry through 16 nines
    check16(64'h4545454545454545, 64'h5454545454545454, 1'b1);
    check9(rand_bcd(9, 1), rand_bcd(9, 1), 1'b0);
    check9(rand_bcd(9, 1), 64'd1, 1'b0);
    // every pair of single digits with both carry-ins, in every digit slot
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int ci = 0; ci < 2; ci++) begin
          check16(to_bcd(longint'(x) * 64'd1111111111111111), to_bcd(longint'(y)), 1'(ci));
          check9(to_bcd(longint'(x) * 100000000 + longint'(x)),
                 to_bcd(longint'(y) * 100000000 + longint'(y)), 1'(ci));
        end
    // random operands
    for (int t = 0; t < 3000; t++) begin
      check16(rand_bcd(16, (t % 7 == 0) ? 2 : 0), rand_bcd(16, 0), 1'($urandom_range(0, 1)));
      check9(rand_bcd(9, 0), rand_bcd(9, (t % 5 == 0) ? 2 : 0), 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
