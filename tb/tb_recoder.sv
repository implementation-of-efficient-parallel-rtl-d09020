// tb_recoder: self-checking test of the signed-digit radix-10 recoder.
//
// Places every BCD digit value in every digit position (and random mixes) and
// checks the sign bit and the one-hot magnitude against the rule
// 0..5 -> +digit, 6..9 -> -(10 - digit). It also checks that the recoded
// digit value (sign, magnitude) plus 10 for a negative digit gives the digit
// back.
module tb_recoder;
  import bcd_pkg::*;
  import tb_bcd_pkg::*;

  localparam int unsigned N = 8;

  logic [4*N-1:0]                b;
  logic [N-1:0]                  neg;
  logic [N-1:0][NUM_MULTIPLES:1] sel;
  int unsigned                   checks = 0, failures = 0;

  recoder #(.N(N)) dut (.b(b), .neg(neg), .sel(sel));

  task automatic check(input logic [63:0] x);
    int d, mag, want_mag;
    logic want_neg;
    logic [NUM_MULTIPLES:1] want_sel;
    b = x[4*N-1:0];
    #1;
    for (int i = 0; i < N; i++) begin
      d        = int'(x[4*i +: 4]);
      want_neg = (d >= 6);
      want_mag = want_neg ? 10 - d : d;
      want_sel = '0;
      if (want_mag > 0) want_sel[want_mag] = 1'b1;
      // magnitude from the one-hot code
      mag = 0;
      for (int k = 1; k <= 5; k++) if (sel[i][k]) mag += k;
      checks++;
      if (neg[i] !== want_neg || sel[i] !== want_sel ||
          (neg[i] ? 10 - mag : mag) != d) begin
        failures++;
        $display("FAIL digit %0d = %0d: neg=%b sel=%b", i, d, neg[i], sel[i]);
      end
    end
  endtask

  initial begin
    b = '0;
    for (int v = 0; v < 10; v++) check(longint'(v) * 64'h11111111);
    check(64'h12345678);
    check(64'h98765432);
    for (int t = 0; t < 500; t++) check(rand_bcd(N, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
