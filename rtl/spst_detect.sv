// spst_detect: detection logic of the spurious-power suppression technique.
//
// It watches the most significant part (MSP) of both operands.  When each MSP
// is all zeros or all ones it is only the sign extension of the least
// significant part (LSP), and the MSP of the result can be predicted without
// adding: with a, b in {0,-1} and the LSP carry c in {0,1}, the MSP result is
// a+b+c in {-2,-1,0,1}, i.e. the bit pattern {sign,...,sign,carr_ctrl}.
//   a_and = AND of a_msp,  a_nor = NOR of a_msp   (same for b)
//   close     = (a_and | a_nor) & (b_and | b_nor)
//   sign      = (a_and & b_and) | ((a_and ^ b_and) & ~c_lsp)
//   carr_ctrl = a_and ^ b_and ^ c_lsp
// These cover the five cases of the technique (positive+positive with an LSP
// carry, positive+negative without and with carry, negative+negative without
// and with carry) and the trivial 0+0 case.
// Glitch diminishing: the three outputs pass through a level-sensitive latch
// that is transparent while det_en is high.  Holding det_en low while the
// operands settle and raising it afterwards keeps the transients of the
// detection logic away from the MSP latches and the sign extension.  Tie
// det_en high to make the block purely combinational.  This latch is
// intended; it is the only storage in the block.
// The AND/NOR detection, the three outputs and their names follow the
// design; the closed-form equations for sign and carr_ctrl, the use of the
// LSP carry inside this block and the det_en strobe are this design's
// reading of the five cases.
// Interface: a_msp, b_msp, c_lsp, det_en in; det (close, sign, carr_ctrl),
// a_and, b_and out.
module spst_detect
  import spst_pkg::*;
#(
  parameter int unsigned MSP_W = 8
) (
  input  logic [MSP_W-1:0] a_msp,
  input  logic [MSP_W-1:0] b_msp,
  input  logic             c_lsp,
  input  logic             det_en,
  output det_t             det,
  output logic             a_and,
  output logic             b_and
);
  logic a_nor, b_nor;
  det_t det_raw;

  always_comb begin
    a_and = &a_msp;
    b_and = &b_msp;
    a_nor = ~|a_msp;
    b_nor = ~|b_msp;
    det_raw.close     = (a_and | a_nor) & (b_and | b_nor);
    det_raw.sign      = (a_and & b_and) | ((a_and ^ b_and) & ~c_lsp);
    det_raw.carr_ctrl = a_and ^ b_and ^ c_lsp;
  end

  always_latch begin
    if (det_en) det = det_raw;
  end
endmodule
