// tb_decimal_multiplier_styles: the multiplier built with each adder style.
//
// Instantiates the 8x8-digit multiplier three times, with ripple-carry,
// carry-lookahead and Kogge-Stone adders, drives all three with the same
// corner-case and random operands, and checks each product against integer
// multiplication. The styles must agree bit for bit; they differ only in
// delay and area.
module tb_decimal_multiplier_styles;
  import bcd_pkg::*;
  import tb_bcd_pkg::*;

  localparam int unsigned N = 8;

  logic [4*N-1:0] a, b;
  logic [8*N-1:0] p_ra, p_ma, p_rda;
  int unsigned    checks = 0, failures = 0;

  logic [NUM_MULTIPLES:1][4*N+3:0] m_ra, m_ma, m_rda;
  logic [N-1:0][4*N+3:0]           s_ra, s_ma, s_rda, pp_ra, pp_ma, pp_rda;

  decimal_multiplier #(.N(N), .KIND(ADDER_RA)) dut_ra (
    .a(a), .b(b), .p(p_ra), .mult(m_ra), .sel_mult(s_ra), .pp(pp_ra));
  decimal_multiplier #(.N(N), .KIND(ADDER_MA)) dut_ma (
    .a(a), .b(b), .p(p_ma), .mult(m_ma), .sel_mult(s_ma), .pp(pp_ma));
  decimal_multiplier #(.N(N), .KIND(ADDER_RDA)) dut_rda (
    .a(a), .b(b), .p(p_rda), .mult(m_rda), .sel_mult(s_rda), .pp(pp_rda));

  task automatic run(input logic [63:0] x, input logic [63:0] y);
    logic [63:0] want;
    a = x[4*N-1:0];
    b = y[4*N-1:0];
    #1;
    want = to_bcd(from_bcd(x) * from_bcd(y));
    checks += 3;
    if (p_ra !== want)  begin failures++; $display("FAIL RA  %h x %h = %h", a, b, p_ra);  end
    if (p_ma !== want)  begin failures++; $display("FAIL MA  %h x %h = %h", a, b, p_ma);  end
    if (p_rda !== want) begin failures++; $display("FAIL RDA %h x %h = %h", a, b, p_rda); end
  endtask

  initial begin
    a = '0; b = '0;
    run(64'h99999999, 64'h99999999);
    run(64'h99968999, 64'h12345678);
    run(64'h0, 64'h99999999);
    for (int t = 0; t < 2000; t++) run(rand_bcd(N, t % 3), rand_bcd(N, (t / 3) % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
