// tb_dec_compressor42: checks the decimal (4:2) compressor row on random BCD
// digits and carry bits, including all-nines words with all carries set (the
// column maximum of 20). The top column is driven as in the multiplier (no
// partial-product digit, multiple digit at most 7). Requires s valid BCD and s + 10*co = x + y + c + cp.
module tb_dec_compressor42;
  import tb_bcd_pkg::*;
  localparam int W = 35;
  logic [4*W-1:0] x, y, s;
  logic [W-1:0]   c, cp, co;
  int checks = 0, failures = 0;

  dec_compressor42 #(.W(W)) dut (.x, .y, .c, .cp, .s, .co);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 600; k++) begin
      bcdw_t bx, by, got, exp;
      bx = rand_bcd(W, k % 3);
      by = rand_bcd(W, (k / 3) % 3);
      for (int i = 0; i < W; i++) begin
        c[i]  = (k < 5) ? 1'b1 : 1'($urandom_range(0, 1));
        cp[i] = (k < 5) ? 1'b1 : 1'($urandom_range(0, 1));
      end
      if (k < 5) begin bx = rand_bcd(W, 1); by = rand_bcd(W, 1); end
      // Top column as in the multiplier: the partial product has no digit
      // there and the multiple's top digit is at most 7 (plus its carry).
      bx[4*(W-1) +: 4] = 4'($urandom_range(0, 7));
      by[4*(W-1) +: 4] = 4'd0;
      cp[W-1] = 1'b0;
      x = bx[4*W-1:0];
      y = by[4*W-1:0];
      #1;
      got = bcd_add(bcdw_t'(s), bits_to_bcd(MAXD'(co) << 1));
      exp = bcd_add(bcd_add(bx, by), bcd_add(bits_to_bcd(MAXD'(c)), bits_to_bcd(MAXD'(cp))));
      checks++;
      if (got != exp || !is_bcd(bcdw_t'(s))) begin
        failures++;
        $display("FAIL x=%h y=%h s=%h co=%b", x, y, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
