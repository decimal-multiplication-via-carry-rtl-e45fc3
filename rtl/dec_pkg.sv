// dec_pkg: types shared by the BCD carry-save multiplier.
//
// A BCD digit is four bits, bit 0 the least significant; multi-digit words are
// packed arrays of digits with digit 0 the least significant. The two multiple
// selects name which secondary multiple of the multiplicand A each multiplexor
// passes to the decimal (3:2) counter. The split of a multiplier digit b into
// b' (from {0, A, 4A, 5A}) and b'' (from {0, 2A, 4A}) is given by recode_digit;
// the multiplexor contents follow the multiplier's datapath, the particular
// split of 4 (4A + 0) and of 8 (4A + 4A) is this design's choice.
package dec_pkg;

  typedef logic [3:0] bcd_t;

  // First multiplexor: 0, A, 4A, 5A.
  typedef enum logic [1:0] {
    SEL1_ZERO = 2'd0,
    SEL1_A1   = 2'd1,
    SEL1_A4   = 2'd2,
    SEL1_A5   = 2'd3
  } sel1_e;

  // Second multiplexor: 0, 2A, 4A.
  typedef enum logic [1:0] {
    SEL2_ZERO = 2'd0,
    SEL2_A2   = 2'd1,
    SEL2_A4   = 2'd2
  } sel2_e;

  typedef struct packed {
    sel1_e sel1;
    sel2_e sel2;
  } mux_ctrl_t;

  // Split one multiplier digit b into two secondary multiples whose sum is b*A.
  // Digit codes above 9 select nothing.
  function automatic mux_ctrl_t recode_digit(bcd_t b);
    mux_ctrl_t m;
    unique case (b)
      4'd0:    m = '{SEL1_ZERO, SEL2_ZERO};
      4'd1:    m = '{SEL1_A1,   SEL2_ZERO};
      4'd2:    m = '{SEL1_ZERO, SEL2_A2};
      4'd3:    m = '{SEL1_A1,   SEL2_A2};
      4'd4:    m = '{SEL1_A4,   SEL2_ZERO};
      4'd5:    m = '{SEL1_A5,   SEL2_ZERO};
      4'd6:    m = '{SEL1_A4,   SEL2_A2};
      4'd7:    m = '{SEL1_A5,   SEL2_A2};
      4'd8:    m = '{SEL1_A4,   SEL2_A4};
      4'd9:    m = '{SEL1_A5,   SEL2_A4};
      default: m = '{SEL1_ZERO, SEL2_ZERO};
    endcase
    return m;
  endfunction

endpackage
