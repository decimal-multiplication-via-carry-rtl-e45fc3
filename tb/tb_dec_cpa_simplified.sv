// tb_dec_cpa_simplified: checks the two-stage simplified carry-propagate
// adder. Random partial products (BCD digits plus one carry bit per digit),
// including long runs of nines that make a carry travel far, are loaded one
// per cycle; the sum must appear on p exactly one cycle after load.
module tb_dec_cpa_simplified;
  import tb_bcd_pkg::*;
  localparam int N = 34;
  logic           clk = 0, load;
  logic [4*N-1:0] ps, p;
  logic [N-1:0]   pc;
  bcdw_t          exp_q;
  logic           exp_v;
  int checks = 0, failures = 0;

  dec_cpa_simplified #(.N(N)) dut (.clk, .load, .ps, .pc, .p);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; exp_v = 0;
    for (int k = 0; k < 400; k++) begin
      bcdw_t bps;
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (bcdw_t'(p) != exp_q) begin
          failures++;
          $display("FAIL got %h exp %h", p, exp_q[4*N-1:0]);
        end
      end
      bps = rand_bcd(N - 1, k % 3);
      for (int i = 0; i < N - 1; i++) pc[i] = 1'($urandom_range(0, 1));
      pc[N-1] = 1'b0;
      if (k % 7 == 0) begin bps = rand_bcd(N - 1, 1) | bcdw_t'(0); pc = '0; pc[0] = 1'b1; end
      if (k == 1) begin bps = '0; for (int i = 0; i < N - 1; i++) bps[4*i +: 4] = 4'd9; pc = 1; end
      ps = bps[4*N-1:0];
      load = (k % 5 != 4);
      exp_v = load;
      exp_q = bcd_add(bps, bits_to_bcd(MAXD'(pc)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
