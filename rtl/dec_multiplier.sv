// dec_multiplier: fixed-point BCD multiplier built on decimal carry-save
// addition (top level).
//
// Computes P = A * B for N-digit BCD operands, giving a 2N-digit BCD product.
// The multiplier B is consumed one digit b per cycle, least significant first.
// Each digit is split into two secondary multiples, A*b' from {0, A, 4A, 5A}
// and A*b'' from {0, 2A, 4A}; the multiples 2A, 4A, 5A are regenerated every
// cycle from the multiplicand register by carry-free logic and never stored.
// Pipeline, one register per line:
//   multiplicand register  -> multiple generation -> two multiplexors ->
//   decimal (3:2) counter  -> primary multiple register (TS, TC) ->
//   decimal (4:2) compressor with the partial product (PS, PC) -> shift right
//   one digit -> partial product register; the digit shifted out is final
//   and enters the final product shift register (the low half of P) ->
//   simplified carry-propagate adder, first portion -> intermediate register
//   -> second portion -> product register (both halves of P).
// So the only loop is compressor -> partial product register, and each digit
// adds at most 9 + 9 + 1 + 1.
// Interface: start is a request, held with a and b steady until ready; the
// edge at which both are high captures a and b;
// done pulses for one cycle when p holds the product, which stays until the
// next product is written. Timing: n + 4 cycles from the cycle in which the
// operands are presented to the one in which p is valid, for n = N multiplier
// digits; a new operation can start every n + 1 cycles, overlapping the final
// addition of the previous one. EARLY_EXIT (off by default) stops after the
// most significant non-zero digit of B; the product register then takes the
// adder output and the low digits shifted into place. SWAP_OPERANDS (off by
// default) first exchanges A and B when A has more leading zero digits, so
// the shorter operand drives the iterations; the comparison and swap sit in
// front of the operand registers and add no cycle. The single clock edge
// replaces the two-phase master/slave latches, enables replace gated clocks,
// the product register also holding the low half, and the reset (active low,
// synchronous, control only) are this design's choices.
module dec_multiplier
  import dec_pkg::*;
#(
  parameter int unsigned N          = 34,   // digits per operand
  parameter bit          EARLY_EXIT = 1'b0,
  parameter bit          SWAP_OPERANDS = 1'b0  // use with EARLY_EXIT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [4*N-1:0]   a,      // multiplicand, BCD, digit 0 in bits 3:0
  input  logic [4*N-1:0]   b,      // multiplier, BCD
  output logic             ready,
  output logic             done,
  output logic [8*N-1:0]   p       // product, 2N BCD digits
);
  localparam int unsigned W  = N + 1;
  localparam int unsigned CW = $clog2(N + 1);

  mux_ctrl_t      mux_ctrl;
  logic           pmr_load, pp_clear, pp_iter, cpa_load, out_load;
  logic [CW-1:0]  iters;

  logic [4*N-1:0] a_q;                 // multiplicand register
  logic [4*W-1:0] a2, a4, a5, m1, m2;  // multiples and selected multiples
  logic [4*W-1:0] ts, ts_q;            // counter sum, primary multiple register
  logic [W-1:0]   tc, tc_q;
  logic [4*N-1:0] ps_q;                // partial product register
  logic [N-1:0]   pc_q;
  logic [4*W-1:0] cs;                  // compressor outputs
  logic [W-1:0]   cco;
  logic [4*N-1:0] fpsr;                // final product shift register
  logic [4*N-1:0] p_hi;

  // Operand swap: the operand with more leading zero digits becomes the
  // multiplier, so that early exit ends sooner.
  function automatic int unsigned lead_zeros(logic [4*N-1:0] x);
    int unsigned z;
    z = N;
    for (int i = 0; i < int'(N); i++) if (x[4*i +: 4] != 4'd0) z = N - 1 - i;
    return z;
  endfunction

  logic [4*N-1:0] a_in, b_in;
  logic           swap;

  always_comb begin
    swap = SWAP_OPERANDS && (lead_zeros(a) > lead_zeros(b));
    a_in = swap ? b : a;
    b_in = swap ? a : b;
  end

  dec_mult_ctrl #(.N(N), .EARLY_EXIT(EARLY_EXIT)) u_ctrl (
    .clk, .rst_n, .start, .b(b_in), .ready, .mux_ctrl, .pmr_load, .pp_clear,
    .pp_iter, .cpa_load, .out_load, .iters, .done
  );

  always_ff @(posedge clk) begin
    if (start && ready) a_q <= a_in;
  end

  dec_multiple_gen #(.N(N)) u_gen (.a(a_q), .a2, .a4, .a5);

  dec_multiple_mux #(.N(N)) u_mux (
    .a(a_q), .a2, .a4, .a5, .ctrl(mux_ctrl), .m1, .m2
  );

  dec_counter32 #(.W(W)) u_cnt (.m1, .m2, .ts, .tc);

  always_ff @(posedge clk) begin
    if (pmr_load) begin
      ts_q <= ts;
      tc_q <= tc;
    end
  end

  dec_compressor42 #(.W(W)) u_cmp (
    .x (ts_q),
    .y ({4'd0, ps_q}),
    .c (tc_q),
    .cp({1'b0, pc_q}),
    .s (cs),
    .co(cco)
  );

  always_ff @(posedge clk) begin
    if (pp_clear) begin
      ps_q <= '0;
      pc_q <= '0;
    end else if (pp_iter) begin
      ps_q <= cs[4*W-1:4];           // shift right one digit
      pc_q <= cco[N-1:0];            // carry out of digit i now weighs 10^i
      fpsr <= {cs[3:0], fpsr[4*N-1:4]};
    end
  end

  dec_cpa_simplified #(.N(N)) u_cpa (
    .clk, .load(cpa_load), .ps(ps_q), .pc(pc_q), .p(p_hi)
  );

  // Final product register. After an early exit with k iterations the high
  // part from the adder moves up k digits and the k retired digits, which sit
  // at the top of the shift register, move down to the bottom.
  if (EARLY_EXIT) begin : g_align
    always_ff @(posedge clk) begin
      if (out_load) p <= {p_hi, fpsr} >> (4 * (N - int'(iters)));
    end
  end else begin : g_plain
    logic unused_iters;
    assign unused_iters = ^iters;
    always_ff @(posedge clk) begin
      if (out_load) p <= {p_hi, fpsr};
    end
  end

  a_operands_held: assert property (@(posedge clk) disable iff (!rst_n)
    start && !ready |=> $stable(a) && $stable(b))
    else $error("operands changed while a start was waiting");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    pp_iter |-> (cco[N] == 1'b0))
    else $error("partial product overflowed its N+1 digits");
  a_clear_not_iter: assert property (@(posedge clk) disable iff (!rst_n)
    !(pp_clear && pp_iter))
    else $error("partial product cleared and iterated in the same cycle");
endmodule
