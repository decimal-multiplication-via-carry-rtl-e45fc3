// dec_digit_add: direct decimal addition of two BCD digits and a carry.
//
// Computes (cout, s) = x + y + cin for BCD digits x, y (0..9) and a one-bit
// carry, where cout weighs ten times s. No binary sum followed by a +6
// correction is formed: the sum bits come straight from per-bit generate
// (g = x&y), propagate (p = x|y) and half-sum (h = x^y) signals, two group
// terms k (the digit pair alone reaches ten) and l (it reaches eight), and the
// carry c1 out of the ones position. The equations are the published
// direct-decimal-addition ones; the complement bars of s2 and s3 are read as
// covering single variables, which is the reading that is exact for all 200
// input cases. Used as a decimal (3:2) counter (one digit of a carry-save
// adder) and, with y limited to 0/1, as the simplified counter in the decimal
// (4:2) compressor. Purely combinational.
module dec_digit_add (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] g, p, h;
  logic       k, l, c1;

  always_comb begin
    g  = x & y;
    p  = x | y;
    h  = x ^ y;
    k  = g[3] | (p[3] & p[2]) | (p[3] & p[1]) | (g[2] & p[1]);
    l  = p[3] | g[2] | (p[2] & g[1]);
    c1 = g[0] | (p[0] & cin);

    s[0] = h[0] ^ cin;
    s[1] = ((h[1] ^ k) & ~c1) | (~(h[1] ^ l) & c1);
    s[2] = (~p[2] & g[1]) | (~p[3] & h[2] & ~p[1])
         | ((g[3] | (h[2] & h[1])) & ~c1)
         | (((~p[3] & ~p[2] & p[1]) | (g[2] & g[1]) | (p[3] & p[2])) & c1);
    s[3] = (~k & l & ~c1) | (((g[3] & ~h[3]) | (~h[3] & h[2] & h[1])) & c1);
    cout = k | (l & c1);
  end
endmodule
