// tb_dec_counter32: checks the decimal (3:2) counter row. For random BCD
// operands (top digit kept small, as for the multiples 0..5A and 0..4A) the
// sum word must be valid BCD, tc[0] must be 0, and ts + tc must equal m1 + m2.
module tb_dec_counter32;
  import tb_bcd_pkg::*;
  localparam int W = 35;
  logic [4*W-1:0] m1, m2, ts;
  logic [W-1:0]   tc;
  int checks = 0, failures = 0;

  dec_counter32 #(.W(W)) dut (.m1, .m2, .ts, .tc);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      bcdw_t x, y, got, exp;
      x = rand_bcd(W - 1, k % 3);
      y = rand_bcd(W - 1, (k / 3) % 3);
      x[4*(W-1) +: 4] = 4'($urandom_range(0, 4));
      y[4*(W-1) +: 4] = 4'($urandom_range(0, 4));
      m1 = x[4*W-1:0];
      m2 = y[4*W-1:0];
      #1;
      got = bcd_add(bcdw_t'(ts), bits_to_bcd(MAXD'(tc)));
      exp = bcd_add(x, y);
      checks++;
      if (got != exp || !is_bcd(bcdw_t'(ts)) || tc[0]) begin
        failures++;
        $display("FAIL m1=%h m2=%h ts=%h tc=%b", m1, m2, ts, tc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
