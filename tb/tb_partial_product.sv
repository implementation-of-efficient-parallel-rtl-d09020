// tb_partial_product: self-checking test of the partial product former.
//
// For random 8-digit multiplicands and every multiplier digit 0..9 it feeds
// the block what the recoder and selector would give it (sign, and the
// magnitude multiple |d|*A computed in integer arithmetic) and checks that the
// output is digit*A. The block is built with each of the three adder styles.
module tb_partial_product;
  import bcd_pkg::*;
  import tb_bcd_pkg::*;

  localparam int unsigned N = 8;

  logic [4*N-1:0] a;
  logic [4*N+3:0] mag, pp_ra, pp_ma, pp_rda;
  logic           neg;
  int unsigned    checks = 0, failures = 0;

  partial_product #(.N(N), .KIND(ADDER_RA))  dut_ra  (.a(a), .mag(mag), .neg(neg), .pp(pp_ra));
  partial_product #(.N(N), .KIND(ADDER_MA))  dut_ma  (.a(a), .mag(mag), .neg(neg), .pp(pp_ma));
  partial_product #(.N(N), .KIND(ADDER_RDA)) dut_rda (.a(a), .mag(mag), .neg(neg), .pp(pp_rda));

  task automatic check(input logic [63:0] x, input int d);
    logic [63:0] want, m;
    int mg;
    neg  = (d >= 6);
    mg   = neg ? 10 - d : d;
    m    = to_bcd(from_bcd(x) * longint'(mg));
    want = to_bcd(from_bcd(x) * longint'(d));
    a    = x[4*N-1:0];
    mag  = m[4*N+3:0];
    #1;
    checks += 3;
    if (pp_ra !== want[4*N+3:0] || pp_ma !== want[4*N+3:0] || pp_rda !== want[4*N+3:0]) begin
      failures++;
      $display("FAIL %h * %0d: ra=%h ma=%h rda=%h want=%h", a, d, pp_ra, pp_ma, pp_rda, want[4*N+3:0]);
    end
  endtask

  initial begin
    a = '0; mag = '0; neg = 1'b0;
    for (int d = 0; d < 10; d++) begin
      check(64'h0, d);
      check(64'h99999999, d);
      check(64'h99968999, d);
    end
    for (int t = 0; t < 500; t++)
      for (int d = 0; d < 10; d++) check(rand_bcd(N, t % 3), d);
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
