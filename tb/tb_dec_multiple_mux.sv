// tb_dec_multiple_mux: drives distinct random words on the A, 2A, 4A and 5A
// inputs and checks, for every multiplier digit 0..9 recoded into the two
// selects, that each multiplexor routes the expected word (or zero).
module tb_dec_multiple_mux;
  import dec_pkg::*;
  localparam int N = 34;
  logic [4*N-1:0]     a;
  logic [4*(N+1)-1:0] a2, a4, a5, m1, m2;
  mux_ctrl_t          ctrl;
  int checks = 0, failures = 0;

  dec_multiple_mux #(.N(N)) dut (.a, .a2, .a4, .a5, .ctrl, .m1, .m2);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4*(N+1)-1:0] rnd();
    logic [4*(N+1)-1:0] r;
    for (int i = 0; i < 4*(N+1); i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    for (int k = 0; k < 20; k++)
      for (int dg = 0; dg < 10; dg++) begin
        logic [4*(N+1)-1:0] e1, e2;
        int w1, w2;
        e1 = rnd();
        a  = e1[4*N-1:0];
        a2 = rnd();
        a4 = rnd();
        a5 = rnd();
        // Expected split of each digit: first weight from {0,1,4,5},
        // second from {0,2,4}, summing to the digit.
        w1 = (dg >= 5 && dg != 6 && dg != 8) ? 5 : (dg >= 4) ? 4 : dg % 2;
        w2 = dg - w1;
        ctrl = recode_digit(4'(dg));
        #1;
        e1 = (w1 == 0) ? '0 : (w1 == 1) ? {4'd0, a} : (w1 == 4) ? a4 : a5;
        e2 = (w2 == 0) ? '0 : (w2 == 2) ? a2 : a4;
        checks += 2;
        if (m1 != e1 || w1 + w2 != dg) begin failures++; $display("FAIL m1 digit %0d", dg); end
        if (m2 != e2 || !(w2 inside {0, 2, 4})) begin failures++; $display("FAIL m2 digit %0d", dg); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
