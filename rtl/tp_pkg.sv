// tp_pkg -- shared types and helpers of the twin-precision multiplier and MAC.
//
// The 2-bit select of the twin-precision multiplier is decoded by an OR gate
// ("some multiplier runs") and an AND gate ("both multipliers run"), as in the
// block diagram of the design. The encoding below is this design's own:
//   00  idle   - both N/2 multipliers hold their operands (operand isolation)
//   01  twin   - one N/2 multiplier runs and returns two independent
//                N/2 x N/2 products per cycle
//   10  twin   - same as 01 (the OR gate cannot tell them apart)
//   11  full   - both N/2 multipliers run and one N x N product is formed
package tp_pkg;

  typedef enum logic [1:0] {
    SEL_IDLE  = 2'b00,
    SEL_TWIN0 = 2'b01,
    SEL_TWIN1 = 2'b10,
    SEL_FULL  = 2'b11
  } sel_e;

  // Operands and signedness of one product formed by an N/2 multiplier.
  typedef struct packed {
    logic a_signed;
    logic b_signed;
  } sign_pair_t;

endpackage
