// spst_pkg: types shared by the spurious-power suppression (SPST) blocks.
//
// det_t is the three-bit output of the detection logic:
//   close     - the MSP operands are both pure sign extensions, so the MSP
//               adder is frozen and its result is produced by sign extension
//   sign      - the sign bit that fills the upper MSP result bits
//   carr_ctrl - the least significant MSP result bit
package spst_pkg;
  typedef struct packed {
    logic close;
    logic sign;
    logic carr_ctrl;
  } det_t;
endpackage
