// tb_dec_multiplier_full: the multiplier exactly as delivered (34 digits,
// default parameters) taken through complete operations: the largest product
// (all nines times all nines), a random pair and a zero multiplier, each
// checked against a schoolbook BCD product and for its 34 + 4 cycle latency.
module tb_dec_multiplier_full;
  import tb_bcd_pkg::*;
  localparam int N = 34;
  logic           clk = 0, rst_n, start, ready, done;
  logic [4*N-1:0] a, b;
  logic [8*N-1:0] p;
  int checks = 0, failures = 0, cyc = 0;

  dec_multiplier dut (.clk, .rst_n, .start, .a, .b, .ready, .done, .p);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bcdw_t av, bcdw_t bv);
    int t0;
    bcdw_t e;
    a = av[4*N-1:0];
    b = bv[4*N-1:0];
    start = 1;
    while (!ready) @(negedge clk);
    @(negedge clk);
    t0 = cyc;
    start = 0;
    while (!done) @(negedge clk);
    e = bcd_mul(av, bv);
    checks += 2;
    if (bcdw_t'(p) != e) begin failures++; $display("FAIL product %h exp %h", p, e[8*N-1:0]); end
    if (cyc - t0 != N + 3) begin failures++; $display("FAIL latency %0d edges", cyc - t0); end
  endtask

  initial begin
    rst_n = 0; start = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(rand_bcd(N, 1) | '0, '0);
    run(rand_bcd(N), rand_bcd(N));
    begin
      bcdw_t nines = '0;
      for (int i = 0; i < N; i++) nines[4*i +: 4] = 4'd9;
      run(nines, nines);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
