// dec_counter32: decimal (3:2) counter row, the carry-save addition of two
// secondary multiples.
//
// Adds the two selected multiples digit by digit with no carry between digits:
// each digit position is one direct decimal adder with its carry input tied to
// zero, so the tools reduce it to the simplified counter. The result is a BCD
// sum word ts and a carry word tc in which tc[i] is a carry of weight 10^i
// (the carry out of digit i-1, i.e. already moved up one digit); tc[0] is 0.
// The carry out of the top digit is always zero because the multiples' top
// digits are at most 4 and 3. Combinational: ts + tc = m1 + m2.
module dec_counter32 #(
  parameter int unsigned W = 35  // digits per operand (multiplicand digits + 1)
) (
  input  logic [4*W-1:0] m1,
  input  logic [4*W-1:0] m2,
  output logic [4*W-1:0] ts,
  output logic [W-1:0]   tc
);
  logic [W-1:0] cout;

  for (genvar i = 0; i < W; i++) begin : g_digit
    dec_digit_add u_add (
      .x   (m1[4*i +: 4]),
      .y   (m2[4*i +: 4]),
      .cin (1'b0),
      .s   (ts[4*i +: 4]),
      .cout(cout[i])
    );
  end

  assign tc = {cout[W-2:0], 1'b0};
endmodule
