// dec_multiple_mux: the two multiple-select multiplexors.
//
// The 4:1 multiplexor passes 0, A, 4A or 5A and the 3:1 multiplexor passes
// 0, 2A or 4A, steered by the latched control word for the current multiplier
// digit b; the two outputs are the secondary multiples A*b' and A*b'' whose sum
// is A*b. All buses are N+1 digits (A is zero-extended). Combinational.
module dec_multiple_mux
  import dec_pkg::*;
#(
  parameter int unsigned N = 34
) (
  input  logic [4*N-1:0]     a,
  input  logic [4*(N+1)-1:0] a2,
  input  logic [4*(N+1)-1:0] a4,
  input  logic [4*(N+1)-1:0] a5,
  input  mux_ctrl_t          ctrl,
  output logic [4*(N+1)-1:0] m1,   // A*b'  : 0, A, 4A or 5A
  output logic [4*(N+1)-1:0] m2    // A*b'' : 0, 2A or 4A
);
  always_comb begin
    unique case (ctrl.sel1)
      SEL1_A1: m1 = {4'd0, a};
      SEL1_A4: m1 = a4;
      SEL1_A5: m1 = a5;
      default: m1 = '0;
    endcase
    unique case (ctrl.sel2)
      SEL2_A2: m2 = a2;
      SEL2_A4: m2 = a4;
      default: m2 = '0;
    endcase
  end
endmodule
