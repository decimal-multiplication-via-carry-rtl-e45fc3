// tb_dec_multiple_gen: compares 2A, 4A and 5A from the multiple generator
// with reference BCD products for random, all-nines, mostly-zero and
// single-digit multiplicands at the default width of 34 digits.
module tb_dec_multiple_gen;
  import tb_bcd_pkg::*;
  localparam int N = 34;
  logic [4*N-1:0]     a;
  logic [4*(N+1)-1:0] a2, a4, a5;
  int checks = 0, failures = 0;

  dec_multiple_gen #(.N(N)) dut (.a, .a2, .a4, .a5);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(bcdw_t av);
    bcdw_t e2, e4, e5;
    a = av[4*N-1:0];
    #1;
    e2 = bcd_mul(av, bcd_small(2));
    e4 = bcd_mul(av, bcd_small(4));
    e5 = bcd_mul(av, bcd_small(5));
    checks += 3;
    if (a2 != e2[4*(N+1)-1:0]) begin failures++; $display("FAIL 2A a=%h got %h", a, a2); end
    if (a4 != e4[4*(N+1)-1:0]) begin failures++; $display("FAIL 4A a=%h got %h", a, a4); end
    if (a5 != e5[4*(N+1)-1:0]) begin failures++; $display("FAIL 5A a=%h got %h", a, a5); end
  endtask

  initial begin
    for (int d = 0; d < 10; d++)
      for (int e = 0; e < 10; e++) check_one(bcd_small(d * 10 + e));
    check_one(rand_bcd(N, 1) | '0);
    for (int k = 0; k < 300; k++) check_one(rand_bcd(N, k % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
