// tb_bcd_pkg: reference BCD arithmetic for the testbenches.
//
// Words are packed BCD, digit 0 in bits 3:0, up to MAXD digits. Arithmetic is
// done digit by digit on integers (schoolbook multiplication, ripple
// addition), independently of the carry-save hardware under test.
package tb_bcd_pkg;
  localparam int MAXD = 80;
  typedef logic [4*MAXD-1:0] bcdw_t;

  // Random BCD word of nd digits; mode 1 biases towards 9s, mode 2 towards 0s.
  function automatic bcdw_t rand_bcd(int nd, int mode = 0);
    bcdw_t r = '0;
    for (int i = 0; i < nd; i++) begin
      int d;
      d = int'($urandom_range(0, 9));
      if (mode == 1 && $urandom_range(0, 3) != 0) d = 9;
      if (mode == 2 && $urandom_range(0, 3) != 0) d = 0;
      r[4*i +: 4] = 4'(d);
    end
    return r;
  endfunction

  function automatic bcdw_t bcd_add(bcdw_t x, bcdw_t y);
    bcdw_t r = '0;
    int c = 0;
    for (int i = 0; i < MAXD; i++) begin
      int t;
      t = int'(x[4*i +: 4]) + int'(y[4*i +: 4]) + c;
      r[4*i +: 4] = 4'(t % 10);
      c = t / 10;
    end
    return r;
  endfunction

  function automatic bcdw_t bcd_mul(bcdw_t x, bcdw_t y);
    int acc[2*MAXD];
    bcdw_t r = '0;
    int c = 0;
    foreach (acc[i]) acc[i] = 0;
    for (int i = 0; i < MAXD; i++)
      for (int j = 0; j < MAXD; j++)
        acc[i+j] += int'(x[4*i +: 4]) * int'(y[4*j +: 4]);
    for (int i = 0; i < MAXD; i++) begin
      int t;
      t = acc[i] + c;
      r[4*i +: 4] = 4'(t % 10);
      c = t / 10;
    end
    return r;
  endfunction

  function automatic bcdw_t bcd_small(int k);
    bcdw_t r = '0;
    for (int i = 0; i < 10; i++) begin
      r[4*i +: 4] = 4'(k % 10);
      k = k / 10;
    end
    return r;
  endfunction

  // Carry bits (bit i of weight 10^i) as a BCD word of 0/1 digits.
  function automatic bcdw_t bits_to_bcd(logic [MAXD-1:0] c);
    bcdw_t r = '0;
    for (int i = 0; i < MAXD; i++) r[4*i] = c[i];
    return r;
  endfunction

  function automatic bit is_bcd(bcdw_t x);
    for (int i = 0; i < MAXD; i++) if (x[4*i +: 4] > 4'd9) return 1'b0;
    return 1'b1;
  endfunction
endpackage
