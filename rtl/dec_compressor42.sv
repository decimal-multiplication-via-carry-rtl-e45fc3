// dec_compressor42: decimal (4:2) compressor row.
//
// Adds, in each digit position i, two BCD digits x[i] and y[i] and two carry
// bits c[i] and cp[i] (all of weight 10^i); the column total is at most 20. A
// direct decimal adder first forms (c2[i+1], s1[i]) = x[i] + y[i] + c[i]; a
// second adder, used as a simplified counter whose second operand is only one
// bit, then forms (co[i], s[i]) = s1[i] + cp[i] + c2[i]. The intermediate carry
// c2 moves exactly one digit, so no carry ripples along the row. Output:
// BCD sum word s and carry word co, where co[i] is the carry out of digit i
// (weight 10^(i+1)). Combinational: s + 10*co = x + y + c + cp, provided the
// top column's first adder does not carry (x + y + c < 10 there), which
// holds in the multiplier; that carry, c2[W], is left unconnected.
module dec_compressor42 #(
  parameter int unsigned W = 35
) (
  input  logic [4*W-1:0] x,
  input  logic [4*W-1:0] y,
  input  logic [W-1:0]   c,
  input  logic [W-1:0]   cp,
  output logic [4*W-1:0] s,
  output logic [W-1:0]   co
);
  logic [4*W-1:0] s1;
  logic [W:0]     c2;   // c2[i] enters digit i; c2[W] leaves the row

  assign c2[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_digit
    dec_digit_add u_first (
      .x   (x[4*i +: 4]),
      .y   (y[4*i +: 4]),
      .cin (c[i]),
      .s   (s1[4*i +: 4]),
      .cout(c2[i+1])
    );
    dec_digit_add u_second (
      .x   (s1[4*i +: 4]),
      .y   ({3'b000, c2[i]}),
      .cin (cp[i]),
      .s   (s[4*i +: 4]),
      .cout(co[i])
    );
  end
endmodule
