// tb_accumulation_block: self-checking test of the partial product adder tree.
//
// Feeds eight random 9-digit partial products (and the all-maximum case
// 9 * 99999999 in every position) and compares the 16-digit result with the
// integer sum of pp[i] * 10^i. The block is built with each adder style.
module tb_accumulation_block;
  import bcd_pkg::*;
  import tb_bcd_pkg::*;

  localparam int unsigned N = 8;

  logic [N-1:0][4*N+3:0] pp;
  logic [8*N-1:0]        p_ra, p_ma, p_rda;
  int unsigned           checks = 0, failures = 0;

  accumulation_block #(.N(N), .KIND(ADDER_RA))  dut_ra  (.pp(pp), .p(p_ra));
  accumulation_block #(.N(N), .KIND(ADDER_MA))  dut_ma  (.pp(pp), .p(p_ma));
  accumulation_block #(.N(N), .KIND(ADDER_RDA)) dut_rda (.pp(pp), .p(p_rda));

  task automatic check();
    longint unsigned sum;
    logic [63:0] want;
    #1;
    sum = 0;
    for (int i = 0; i < N; i++) sum += from_bcd(64'(pp[i])) * pow10(i);
    want = to_bcd(sum);
    checks += 3;
    if (p_ra !== want || p_ma !== want || p_rda !== want) begin
      failures++;
      $display("FAIL ra=%h ma=%h rda=%h want=%h", p_ra, p_ma, p_rda, want);
    end
  endtask

  initial begin
    pp = '0;
    check();
    for (int i = 0; i < N; i++) pp[i] = 36'h899999991;
    check();
    for (int t = 0; t < 1000; t++) begin
      // partial products are digit * A, at most 9 * (10^8 - 1)
      for (int i = 0; i < N; i++)
        pp[i] = to_bcd(from_bcd(rand_bcd(N, 0)) * longint'($urandom_range(0, 9)))[4*N+3:0];
      check();
    end
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
