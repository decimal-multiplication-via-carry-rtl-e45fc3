// dec_cpa_simplified: two-stage simplified decimal carry-propagate adder.
//
// Converts the redundant partial product (BCD digits ps plus one carry bit pc
// per digit, pc[i] of weight 10^i) into a plain BCD number. Because each
// position adds only a digit and a single bit, the adder is simpler than a
// full BCD adder. First portion (before the intermediate register): each
// position forms d[i] = (ps[i] + pc[i]) mod 10, a generate bit (ps+pc = 10)
// and a propagate bit (ps+pc = 9); a parallel-prefix (Kogge-Stone) network
// turns these into the carry into every digit. The digits "assuming no carry"
// and the carries are stored in the intermediate final product register when
// `load` is high. Second portion (after it): each digit is incremented mod 10
// where its carry is set. Timing: sum appears on `p` the cycle after `load`.
// The carry out of the top digit is dropped; it is zero for every partial
// product of the multiplier. The prefix network is this design's choice.
module dec_cpa_simplified #(
  parameter int unsigned N = 34
) (
  input  logic           clk,
  input  logic           load,
  input  logic [4*N-1:0] ps,
  input  logic [N-1:0]   pc,
  output logic [4*N-1:0] p
);
  logic [4*N-1:0] d, d_q;
  logic [N-1:0]   gen, prop, cin, cin_q;
  logic [N-1:0]   gg, pp, gg_n, pp_n;

  // First portion.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      gen[i]  = pc[i] & (ps[4*i +: 4] == 4'd9);
      prop[i] = pc[i] ? (ps[4*i +: 4] == 4'd8) : (ps[4*i +: 4] == 4'd9);
      d[4*i +: 4] = gen[i] ? 4'd0 : ps[4*i +: 4] + {3'b000, pc[i]};
    end
    gg = gen;
    pp = prop;
    for (int span = 1; span < N; span = span * 2) begin
      gg_n = gg;
      pp_n = pp;
      for (int i = span; i < N; i++) begin
        gg_n[i] = gg[i] | (pp[i] & gg[i-span]);
        pp_n[i] = pp[i] & pp[i-span];
      end
      gg = gg_n;
      pp = pp_n;
    end
    cin = {gg[N-2:0], 1'b0};  // carry into digit i = group generate of 0..i-1
  end

  // Intermediate final product register.
  always_ff @(posedge clk) begin
    if (load) begin
      d_q   <= d;
      cin_q <= cin;
    end
  end

  // Second portion.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (!cin_q[i])                  p[4*i +: 4] = d_q[4*i +: 4];
      else if (d_q[4*i +: 4] == 4'd9) p[4*i +: 4] = 4'd0;
      else                            p[4*i +: 4] = d_q[4*i +: 4] + 4'd1;
    end
  end
endmodule
