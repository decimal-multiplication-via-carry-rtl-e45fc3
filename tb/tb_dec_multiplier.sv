// tb_dec_multiplier: end-to-end test of the BCD multiplier at 34 digits.
//
// Three copies run side by side: the default configuration, one with early
// exit, and one with early exit and operand swapping. Each is fed a stream of operations (random, all nines, zeros, short
// multipliers), mostly with start held high so that a new operation begins
// the moment ready allows, overlapping the previous one's final addition.
// Every product is compared with a schoolbook BCD product; the latency (n + 3
// edges from the start edge to done, i.e. n + 4 cycles) and the initiation
// interval (n + 1 edges between back-to-back starts) are checked, with n = 34,
// or the number of significant digits of the multiplier (with swapping, of
// the operand with more leading zeros) under early exit. Counted mechanisms,
// each of which must occur: back-to-back starts, every multiplier digit value
// 0..9, early exits, and operand swaps.
module tb_dec_multiplier;
  import tb_bcd_pkg::*;
  localparam int N    = 34;
  localparam int NOPS = 40;
  logic clk = 0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int back_to_back[3], early_exits[3], swaps, digit_seen[10];
  bit fin[3];

  always #5 clk = ~clk;

  initial begin
    #(10 * (NOPS * 2 * (N + 8) + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar ee = 0; ee < 3; ee++) begin : g_dut
    logic           start, ready, done;
    logic [4*N-1:0] a, b;
    logic [8*N-1:0] p;
    int             cyc = 0;
    bcdw_t          exp_q[$];
    int             lat_q[$], t0_q[$];
    int             last_start = -1000, last_n = 0;

    if (ee == 0) begin : g_def
      dec_multiplier dut (.clk, .rst_n, .start, .a, .b, .ready, .done, .p);
    end else if (ee == 1) begin : g_ee
      dec_multiplier #(.EARLY_EXIT(1'b1)) dut (.clk, .rst_n, .start, .a, .b, .ready, .done, .p);
    end else begin : g_swap
      dec_multiplier #(.EARLY_EXIT(1'b1), .SWAP_OPERANDS(1'b1)) dut (.clk, .rst_n, .start, .a, .b, .ready, .done, .p);
    end

    always @(posedge clk) cyc++;

    // Result checker, sampling between edges.
    always @(negedge clk) if (rst_n && done) begin
      bcdw_t e;
      int t0, n;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL ee=%0d unexpected done", ee);
      end else begin
        e = exp_q.pop_front();
        n = lat_q.pop_front();
        t0 = t0_q.pop_front();
        if (bcdw_t'(p) != e) begin
          failures++;
          $display("FAIL ee=%0d product %h exp %h", ee, p, e[8*N-1:0]);
        end
        if (cyc - t0 != n + 3) begin
          failures++;
          $display("FAIL ee=%0d latency %0d edges, exp %0d", ee, cyc - t0, n + 3);
        end
      end
    end

    function automatic bcdw_t pick(int k, bit is_b);
      case (k % 8)
        0: return rand_bcd(N, 1);
        1: return is_b ? rand_bcd($urandom_range(1, 6)) : rand_bcd(N);
        2: return rand_bcd(N, 2);
        3: return (k == 3) ? bcdw_t'(0) : rand_bcd(N);
        default: return rand_bcd(N, 0);
      endcase
    endfunction

    initial begin
      start = 0; a = '0; b = '0;
      while (rst_n !== 1'b1) @(negedge clk);
      for (int k = 0; k < NOPS; k++) begin
        bcdw_t av, bv, tmp;
        int top, topa, t0;
        av = pick(k, 0);
        bv = pick(k + 5 * ee, 1);
        if (ee == 2 && k % 2 == 1) begin tmp = av; av = bv; bv = tmp; end
        if (k == 0) begin av = rand_bcd(N, 1) | '0; bv = av; end
        // occasionally leave a gap between operations
        if (k % 9 == 8) begin
          while (!ready) @(negedge clk);
          repeat (3) @(negedge clk);
        end
        a = av[4*N-1:0];
        b = bv[4*N-1:0];
        start = 1;
        while (!ready) @(negedge clk);
        @(negedge clk);        // the edge just passed took the start
        t0 = cyc;
        start = 0;
        top = 0;
        topa = 0;
        for (int i = 0; i < N; i++) begin
          if (bv[4*i +: 4] != 0) top = i;
          if (av[4*i +: 4] != 0) topa = i;
          if (ee == 0) digit_seen[bv[4*i +: 4]]++;
        end
        if (ee == 2 && topa < top) begin top = topa; swaps++; end
        exp_q.push_back(bcd_mul(av, bv));
        t0_q.push_back(t0);
        lat_q.push_back((ee != 0) ? top + 1 : N);
        if (ee != 0 && top + 1 < N) early_exits[ee]++;
        if (t0 - last_start == last_n + 1) back_to_back[ee]++;
        checks++;
        if (t0 - last_start < last_n + 1) begin
          failures++;
          $display("FAIL ee=%0d op %0d start after %0d edges, II is %0d", ee, k, t0 - last_start, last_n + 1);
        end
        last_start = t0;
        last_n = (ee != 0) ? top + 1 : N;
        // hold start for the next operation right away (no negedge gap)
      end
      repeat (N + 10) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("FAIL ee=%0d %0d results missing", ee, exp_q.size()); end
      fin[ee] = 1;
    end
  end

  initial begin
    rst_n = 0;
    fin[0] = 0; fin[1] = 0; fin[2] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("back-to-back starts: %0d / %0d / %0d, early exits: %0d / %0d, swaps: %0d",
             back_to_back[0], back_to_back[1], back_to_back[2], early_exits[1], early_exits[2], swaps);
    checks += 4;
    if (back_to_back[0] == 0 || back_to_back[1] == 0 || back_to_back[2] == 0) begin failures++; $display("FAIL no back-to-back start"); end
    if (early_exits[1] == 0 || early_exits[2] == 0) begin failures++; $display("FAIL no early exit"); end
    if (swaps == 0) begin failures++; $display("FAIL no operand swap"); end
    for (int d = 0; d < 10; d++) if (digit_seen[d] == 0) begin failures++; $display("FAIL digit %0d never used", d); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
