// tb_dec_digit_add: exhaustive check of the direct decimal digit adder over
// all 200 combinations of two BCD digits and a carry-in.
module tb_dec_digit_add;
  logic [3:0] x, y, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  dec_digit_add dut (.x, .y, .cin, .s, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        for (int c = 0; c < 2; c++) begin
          x = 4'(i); y = 4'(j); cin = 1'(c);
          #1;
          checks++;
          if (int'(cout) * 10 + int'(s) != i + j + c || s > 9) begin
            failures++;
            $display("FAIL %0d+%0d+%0d -> cout=%0d s=%0d", i, j, c, cout, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
