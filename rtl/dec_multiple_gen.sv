// dec_multiple_gen: secondary multiples 2A, 4A and 5A of a BCD multiplicand.
//
// Doubling and quintupling a BCD number never carry further than one digit,
// so each result digit is a small function of two source digits: digit i of 2A
// depends on a[i] (its doubled value mod 10) and on a[i-1] (whether a[i-1] >= 5
// carries one in); digit i of 5A depends on a[i] (odd digits give 5, even give
// 0) and on a[i-1] (which contributes floor(5*a[i-1]/10) = 0..4). 4A is the
// doubling logic applied to 2A. The per-bit equations are the published ones.
// Every result is N+1 digits wide; the top digit of 2A, 4A and 5A is at most
// 1, 3 and 4. Purely combinational (about six gate levels for 4A), so the
// multiples are never stored: they are regenerated from the multiplicand
// register in every cycle.
module dec_multiple_gen #(
  parameter int unsigned N = 34  // digits of the multiplicand
) (
  input  logic [4*N-1:0]     a,
  output logic [4*(N+1)-1:0] a2,
  output logic [4*(N+1)-1:0] a4,
  output logic [4*(N+1)-1:0] a5
);
  // Digit i of 2*X from digit x = X[i] and lower neighbour xp = X[i-1].
  function automatic logic [3:0] dbl_digit(logic [3:0] x, logic [3:0] xp);
    logic [3:0] r;
    r[0] = (xp[2] & xp[1] & ~xp[0]) | (xp[2] & xp[0]) | xp[3];
    r[1] = (~x[3] & ~x[2] & x[0]) | (x[2] & x[1] & ~x[0]) | (x[3] & ~x[0]);
    r[2] = (x[1] & x[0]) | (~x[2] & x[1]) | (x[3] & ~x[0]);
    r[3] = (x[2] & ~x[1] & ~x[0]) | (x[3] & x[0]);
    return r;
  endfunction

  // Digit i of 5*X from digit x = X[i] and lower neighbour xp = X[i-1].
  function automatic logic [3:0] quint_digit(logic [3:0] x, logic [3:0] xp);
    logic [3:0] r;
    r[0] = (x[0] & ~xp[3] & ~xp[1]) | (~x[0] & xp[1]) | (x[0] & xp[3]);
    r[1] = (~x[0] & xp[2]) | (x[0] & ~xp[2] & xp[1]) | (xp[2] & ~xp[1]);
    r[2] = (x[0] & ~xp[3] & ~xp[1]) | (x[0] & ~xp[2] & xp[1]) | (~x[0] & xp[3]);
    r[3] = (x[0] & xp[2] & xp[1]) | (x[0] & xp[3]);
    return r;
  endfunction

  logic [4*(N+2)-1:0] ax;  // A with a zero digit below and above

  always_comb begin
    ax = {4'd0, a, 4'd0};
    for (int i = 0; i <= N; i++) begin
      a2[4*i +: 4] = dbl_digit(ax[4*(i+1) +: 4], ax[4*i +: 4]);
      a5[4*i +: 4] = quint_digit(ax[4*(i+1) +: 4], ax[4*i +: 4]);
    end
    for (int i = 0; i <= N; i++) begin
      a4[4*i +: 4] = dbl_digit(a2[4*i +: 4], (i == 0) ? 4'd0 : a2[4*(i-1) +: 4]);
    end
  end
endmodule
