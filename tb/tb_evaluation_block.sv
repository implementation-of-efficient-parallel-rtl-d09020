// tb_evaluation_block: self-checking test of the multiple generator.
//
// Applies corner-case and random 8-digit multiplicands (including the two of
// the reference waveform, 99999999 and 99968999) and compares each of the five
// outputs with k*A computed in integer arithmetic and converted to BCD. The
// block is built once with each of the three adder styles.
module tb_evaluation_block;
  import bcd_pkg::*;
  import tb_bcd_pkg::*;

  localparam int unsigned N = 8;

  logic [4*N-1:0]                  a;
  logic [NUM_MULTIPLES:1][4*N+3:0] m_ra, m_ma, m_rda;
  int unsigned                     checks = 0, failures = 0;

  evaluation_block #(.N(N), .KIND(ADDER_RA))  dut_ra  (.a(a), .m(m_ra));
  evaluation_block #(.N(N), .KIND(ADDER_MA))  dut_ma  (.a(a), .m(m_ma));
  evaluation_block #(.N(N), .KIND(ADDER_RDA)) dut_rda (.a(a), .m(m_rda));

  task automatic check(input logic [63:0] x);
    logic [63:0] want;
    a = x[4*N-1:0];
    #1;
    for (int k = 1; k <= 5; k++) begin
      want = to_bcd(from_bcd(x) * longint'(k));
      checks += 3;
      if (m_ra[k]  !== want[4*N+3:0]) begin failures++; $display("FAIL RA  %0dA of %h: %h", k, a, m_ra[k]);  end
      if (m_ma[k]  !== want[4*N+3:0]) begin failures++; $display("FAIL MA  %0dA of %h: %h", k, a, m_ma[k]);  end
      if (m_rda[k] !== want[4*N+3:0]) begin failures++; $display("FAIL RDA %0dA of %h: %h", k, a, m_rda[k]); end
    end
  endtask

  initial begin
    a = '0;
    check(64'h0);
    check(64'h99999999);
    check(64'h99968999);
    check(64'h12345678);
    for (int t = 0; t < 2000; t++) check(rand_bcd(N, (t % 4 == 0) ? 2 : 0));
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
