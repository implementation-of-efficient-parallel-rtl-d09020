// tb_multiple_mux: self-checking test of the multiple selector.
//
// Loads five distinct random words as the multiples 1A..5A and checks that
// each one-hot selection returns the matching word and that an all-zero
// selection returns zero.
module tb_multiple_mux;
  import bcd_pkg::*;
  import tb_bcd_pkg::*;

  localparam int unsigned W = 36;

  logic [NUM_MULTIPLES:1][W-1:0] m;
  logic [NUM_MULTIPLES:1]        sel;
  logic [W-1:0]                  y;
  int unsigned                   checks = 0, failures = 0;

  multiple_mux #(.W(W)) dut (.m(m), .sel(sel), .y(y));

  initial begin
    m = '0; sel = '0;
    for (int t = 0; t < 300; t++) begin
      for (int k = 1; k <= 5; k++) m[k] = rand_bcd(9, 0)[W-1:0];
      for (int k = 0; k <= 5; k++) begin
        sel = '0;
        if (k > 0) sel[k] = 1'b1;
        #1;
        checks++;
        if (y !== ((k > 0) ? m[k] : '0)) begin
          failures++;
          $display("FAIL sel=%b y=%h", sel, y);
        end
      end
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
