// tb_decimal_multiplier: end-to-end test of the 8x8-digit BCD multiplier.
//
// Runs the multiplier at its default configuration (8 digits, Kogge-Stone
// adders). First the two operand pairs of the reference waveform are applied
// and every observable stage is compared with the published values: the
// multiples 1A..5A, the selected magnitudes, the partial products and the
// product (99999999 x 99999999 = 9999999800000001; 99968999 x 12345678 =
// 1234185071636322). Then corner cases and random operands are checked
// against integer multiplication, stage by stage.
//
// The test counts how often each recoding case occurs (zero digit, positive
// digit, negative digit completed with 10A, and each magnitude 1..5 chosen)
// and counts a failure for any case that never happened.
module tb_decimal_multiplier;
  import bcd_pkg::*;
  import tb_bcd_pkg::*;

  localparam int unsigned N = DIGITS;

  logic [4*N-1:0]                  a, b;
  logic [8*N-1:0]                  p;
  logic [NUM_MULTIPLES:1][4*N+3:0] mult;
  logic [N-1:0][4*N+3:0]           sel_mult, pp;
  int unsigned                     checks = 0, failures = 0;
  int unsigned                     n_zero = 0, n_pos = 0, n_neg = 0;
  int unsigned                     n_mag [1:5];

  decimal_multiplier dut (
    .a(a), .b(b), .p(p), .mult(mult), .sel_mult(sel_mult), .pp(pp));

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h want %h", what, a, b, got, want);
    end
  endtask

  // apply one operand pair and check every stage against integer arithmetic
  task automatic run(input logic [63:0] x, input logic [63:0] y);
    longint unsigned av, bv;
    int d, mg;
    a = x[4*N-1:0];
    b = y[4*N-1:0];
    #1;
    av = from_bcd(x);
    bv = from_bcd(y);
    for (int k = 1; k <= 5; k++) expect_eq($sformatf("M%0d", k), 64'(mult[k]), to_bcd(av * longint'(k)));
    for (int i = 0; i < N; i++) begin
      d  = int'(y[4*i +: 4]);
      mg = (d >= 6) ? 10 - d : d;
      expect_eq($sformatf("P%0d", i+1), 64'(sel_mult[i]), to_bcd(av * longint'(mg)));
      expect_eq($sformatf("PP%0d", i+1), 64'(pp[i]), to_bcd(av * longint'(d)));
      if (d == 0) n_zero++;
      else if (d >= 6) n_neg++;
      else n_pos++;
      if (mg > 0) n_mag[mg]++;
    end
    expect_eq("P", p, to_bcd(av * bv));
  endtask

  initial begin
    a = '0; b = '0;
    for (int k = 1; k <= 5; k++) n_mag[k] = 0;

    // reference waveform, first operand pair
    run(64'h99999999, 64'h99999999);
    expect_eq("fig M1", 64'(mult[1]), 64'h099999999);
    expect_eq("fig M5", 64'(mult[5]), 64'h499999995);
    for (int i = 0; i < N; i++) begin
      expect_eq("fig P_i", 64'(sel_mult[i]), 64'h099999999);
      expect_eq("fig PP_i", 64'(pp[i]), 64'h899999991);
    end
    expect_eq("fig P", p, 64'h9999999800000001);

    // reference waveform, second operand pair
    run(64'h99968999, 64'h12345678);
    expect_eq("fig M2", 64'(mult[2]), 64'h199937998);
    expect_eq("fig M3", 64'(mult[3]), 64'h299906997);
    expect_eq("fig M4", 64'(mult[4]), 64'h399875996);
    expect_eq("fig P1", 64'(sel_mult[0]), 64'h199937998);
    expect_eq("fig P4", 64'(sel_mult[3]), 64'h499844995);
    expect_eq("fig P8", 64'(sel_mult[7]), 64'h099968999);
    expect_eq("fig PP1", 64'(pp[0]), 64'h799751992);
    expect_eq("fig PP2", 64'(pp[1]), 64'h699782993);
    expect_eq("fig PP3", 64'(pp[2]), 64'h599813994);
    expect_eq("fig PP8", 64'(pp[7]), 64'h099968999);
    expect_eq("fig P", p, 64'h1234185071636322);

    // corner cases
    run(64'h0, 64'h0);
    run(64'h99999999, 64'h0);
    run(64'h0, 64'h99999999);
    run(64'h1, 64'h1);
    run(64'h55555555, 64'h55555555);
    run(64'h66666666, 64'h66666666);
    run(64'h12345678, 64'h90123456);
    for (int v = 0; v < 10; v++) run(64'h99999999, longint'(v) * 64'h11111111);

    // random operands
    for (int t = 0; t < 3000; t++) run(rand_bcd(N, t % 3), rand_bcd(N, (t / 3) % 3));

    $display("recoded digits: zero=%0d positive=%0d negative=%0d; magnitudes 1..5: %0d %0d %0d %0d %0d",
             n_zero, n_pos, n_neg, n_mag[1], n_mag[2], n_mag[3], n_mag[4], n_mag[5]);
    checks += 3;
    if (n_zero == 0) failures++;
    if (n_pos == 0) failures++;
    if (n_neg == 0) failures++;
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (n_mag[k] == 0) failures++;
    end
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
