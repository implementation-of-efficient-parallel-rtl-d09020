// tb_bcd_pkg: reference helpers for the BCD testbenches.
//
// Converts between binary integers and packed BCD (up to 16 digits) and makes
// random BCD operands, so expected results can be computed with ordinary
// integer arithmetic, independently of the BCD hardware under test.
package tb_bcd_pkg;

  // binary -> packed BCD, 16 digits
  function automatic logic [63:0] to_bcd(input longint unsigned v);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < 16; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  // packed BCD, 16 digits -> binary
  function automatic longint unsigned from_bcd(input logic [63:0] x);
    longint unsigned r;
    r = 0;
    for (int i = 15; i >= 0; i--) r = r * 10 + longint'(x[4*i +: 4]);
    return r;
  endfunction

  // random BCD number of 'digits' digits; mode 1 gives all nines, mode 2 gives
  // digits drawn only from 5..9 (many negative recoded digits)
  function automatic logic [63:0] rand_bcd(input int digits, input int mode);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < digits; i++) begin
      case (mode)
        1:       r[4*i +: 4] = 4'd9;
        2:       r[4*i +: 4] = 4'(5 + $urandom_range(0, 4));
        default: r[4*i +: 4] = 4'($urandom_range(0, 9));
      endcase
    end
    return r;
  endfunction

  // 10^n
  function automatic longint unsigned pow10(input int n);
    longint unsigned r;
    r = 1;
    for (int i = 0; i < n; i++) r = r * 10;
    return r;
  endfunction

endpackage
