// tb_dec_mult_ctrl: checks the multiplier control sequence on its own, for the
// default controller and for one with early exit. For each operation it
// records the multiplexor control word at every primary-multiple load and
// checks that, in order, the selected weights add up to the multiplier digits
// from the least significant one; that the number of loads is n (34, or the
// number of significant digits with early exit); that done follows the start
// by n + 3 edges, iters reports n, and ready returns n + 1 edges after start.
module tb_dec_mult_ctrl;
  import dec_pkg::*;
  import tb_bcd_pkg::*;
  localparam int N = 34;
  logic clk = 0, rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int w1(sel1_e s);
    return (s == SEL1_A1) ? 1 : (s == SEL1_A4) ? 4 : (s == SEL1_A5) ? 5 : 0;
  endfunction
  function automatic int w2(sel2_e s);
    return (s == SEL2_A2) ? 2 : (s == SEL2_A4) ? 4 : 0;
  endfunction

  for (genvar ee = 0; ee < 2; ee++) begin : g_dut
    logic                  start, ready, pmr_load, pp_clear, pp_iter, cpa_load, out_load, done;
    logic [4*N-1:0]        b;
    mux_ctrl_t             mux_ctrl;
    logic [$clog2(N+1)-1:0] iters;
    int                    cyc = 0;

    dec_mult_ctrl #(.N(N), .EARLY_EXIT(ee)) dut (
      .clk, .rst_n, .start, .b, .ready, .mux_ctrl, .pmr_load, .pp_clear,
      .pp_iter, .cpa_load, .out_load, .iters, .done
    );

    always @(posedge clk) cyc++;

    task automatic run_op(bcdw_t bv);
      int t0, loads, n_exp, top;
      bit seen_done;
      b = bv[4*N-1:0];
      top = 0;
      for (int i = 0; i < N; i++) if (bv[4*i +: 4] != 0) top = i;
      n_exp = (ee != 0) ? top + 1 : N;
      while (!ready) @(negedge clk);
      start = 1;
      @(negedge clk);
      t0 = cyc;     // cyc now counts the edge that took the start
      start = 0;
      loads = 0; seen_done = 0;
      for (int k = 0; k < N + 6; k++) begin
        if (pmr_load) begin
          checks++;
          if (w1(mux_ctrl.sel1) + w2(mux_ctrl.sel2) != int'(bv[4*loads +: 4])) begin
            failures++;
            $display("FAIL ee=%0d digit %0d recoded wrong", ee, loads);
          end
          if (pp_clear != (loads == 0)) begin failures++; $display("FAIL pp_clear"); end
          loads++;
        end
        if (ready && k < n_exp - 1) begin failures++; $display("FAIL ready early ee=%0d k=%0d", ee, k); end
        if (done) begin
          seen_done = 1;
          checks++;
          if (cyc - t0 != n_exp + 3 || int'(iters) != n_exp) begin
            failures++;
            $display("FAIL ee=%0d done after %0d edges iters=%0d, n=%0d", ee, cyc - t0, iters, n_exp);
          end
        end
        @(negedge clk);
      end
      checks += 2;
      if (loads != n_exp) begin failures++; $display("FAIL ee=%0d loads %0d exp %0d", ee, loads, n_exp); end
      if (!seen_done) begin failures++; $display("FAIL ee=%0d no done", ee); end
    endtask

    initial begin
      start = 0; b = '0;
      @(negedge clk); @(negedge clk);
      while (rst_n !== 1'b1) @(negedge clk);
      run_op(rand_bcd(N));
      run_op('0);
      run_op(bcd_small(7));
      run_op(rand_bcd(12));
      run_op(rand_bcd(N, 1));
      for (int k = 0; k < 10; k++) run_op(rand_bcd($urandom_range(1, N)));
    end
  end

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (16 * (N + 10) + 20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
