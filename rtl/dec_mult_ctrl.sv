// dec_mult_ctrl: control logic of the BCD carry-save multiplier.
//
// Walks the multiplier B from its least significant digit upward, one digit
// per cycle, and schedules the datapath:
//   * the multiplexor control register (mux_ctrl) holds the recoded selects
//     for a digit one cycle before its multiple is formed;
//   * pmr_load: the primary multiple register takes the multiple for the digit
//     in mux_ctrl; pp_clear: the partial product register is reset as the
//     first multiple of an operation is loaded;
//   * pp_iter: the partial product register and the final product shift
//     register take one iteration (add the stored multiple, shift one digit);
//   * cpa_load / out_load: the two final-addition stages; done pulses in the
//     cycle after out_load, when the product register holds the result.
// start is a request held until ready; it is taken at an edge where both are
// high (operands are captured by
// the datapath at the same edge). With n multiplier digits consumed, the
// product is in the product register n+3 edges later (n+4 cycles counting the
// cycle in which the operands are presented), and ready returns so that the
// next start can be taken n+1 edges after the previous one.
// With EARLY_EXIT set, the most significant non-zero digit of B is found at
// start and the digit above it is replaced by the invalid code 1100; the
// control stops when it meets a digit of the form 11xx, so only the
// significant digits are iterated (at least one). iters reports, with
// out_load, how many digits the finishing operation consumed so the datapath
// can align the product. Reset is active low and synchronous; it clears the
// valid flags only. The recoding table and handshake are this design's choice.
module dec_mult_ctrl
  import dec_pkg::*;
#(
  parameter int unsigned N          = 34,
  parameter bit          EARLY_EXIT = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [4*N-1:0]   b,
  output logic             ready,
  output mux_ctrl_t        mux_ctrl,
  output logic             pmr_load,
  output logic             pp_clear,
  output logic             pp_iter,
  output logic             cpa_load,
  output logic             out_load,
  output logic [$clog2(N+1)-1:0] iters,
  output logic             done
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [4*N-1:0] bq;          // remaining multiplier digits, next one in bq[3:0]
  logic           mcr_valid;   // mux_ctrl holds a digit of the running operation
  logic           mcr_first;   // ... and it is the operation's first digit
  logic           pmr_valid;   // the primary multiple register holds a multiple
  logic [CW-1:0]  taken;       // digits moved into mux_ctrl so far
  logic [CW-1:0]  iters_cpa;
  logic           take;        // start accepted this cycle
  logic           more;        // another multiplier digit follows
  logic [4*N-1:0] b_marked;    // B with the early-exit marker inserted

  assign ready    = !mcr_valid;
  assign take     = start && ready;
  assign more     = mcr_valid && (taken < CW'(N)) && (bq[3:2] != 2'b11);
  assign pmr_load = mcr_valid;
  assign pp_clear = mcr_valid && mcr_first;
  assign pp_iter  = pmr_valid;

  // Early-exit marking: the digit above the most significant non-zero digit
  // becomes 1100. A zero multiplier keeps digit 0 (one iteration, adding 0).
  always_comb begin
    b_marked = b;
    if (EARLY_EXIT) begin
      int top;
      top = 0;
      for (int i = 0; i < int'(N); i++)
        if (b[4*i +: 4] != 4'd0) top = i;
      if (top + 1 < int'(N)) b_marked[4*(top+1) +: 4] = 4'b1100;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mcr_valid <= 1'b0;
      mcr_first <= 1'b0;
      pmr_valid <= 1'b0;
      cpa_load  <= 1'b0;
      out_load  <= 1'b0;
      done      <= 1'b0;
      mux_ctrl  <= '{SEL1_ZERO, SEL2_ZERO};
      bq        <= '0;
      taken     <= '0;
      iters_cpa <= '0;
      iters     <= '0;
    end else begin
      pmr_valid <= mcr_valid;
      cpa_load  <= pmr_valid && !mcr_valid;   // last iteration happens now
      out_load  <= cpa_load;
      done      <= out_load;
      if (pmr_valid && !mcr_valid) iters_cpa <= taken;
      if (cpa_load) iters <= iters_cpa;

      if (take) begin
        mux_ctrl  <= recode_digit(b_marked[3:0]);
        bq        <= {4'd0, b_marked[4*N-1:4]};
        mcr_valid <= 1'b1;
        mcr_first <= 1'b1;
        taken     <= CW'(1);
      end else if (more) begin
        mux_ctrl  <= recode_digit(bq[3:0]);
        bq        <= {4'd0, bq[4*N-1:4]};
        mcr_first <= 1'b0;
        taken     <= taken + CW'(1);
      end else begin
        mcr_valid <= 1'b0;
        mcr_first <= 1'b0;
      end
    end
  end

  // start is a request: once raised it must stay high until ready takes it.
  a_start_held: assert property (@(posedge clk) disable iff (!rst_n) start && !ready |=> start)
    else $error("start withdrawn before it was taken");
endmodule
