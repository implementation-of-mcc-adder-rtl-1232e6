// mcc_spst_top: low-power Manchester carry chain (MCC) adders.
//
// Two independent datapaths stand side by side:
//   - spst_addsub: a SPST_WIDTH-bit (16) adder/subtractor split into a least
//     and a most significant half.  Both halves are two-chain 8-bit MCC
//     adders; the upper half is frozen behind latches and its result is
//     produced by sign extension whenever both upper operand halves are all
//     zeros or all ones (spurious-power suppression).
//   - mcc_wide_adder: a WIDE_WIDTH-bit (64) adder assembled from 8-bit
//     two-chain MCC modules.
// Both are combinational: results follow the operands with no clock.  The
// SPST side has one control, det_en, which is the strobe of the detection
// logic's output latch (tie high for plain combinational use) and one status
// output, close, which is high while the upper half is suppressed.
// The two default sizes are those the design is presented at; placing the
// two datapaths in one top is this design's own packaging.
module mcc_spst_top #(
  parameter int unsigned SPST_WIDTH = 16,
  parameter int unsigned WIDE_WIDTH = 64
) (
  // SPST adder/subtractor
  input  logic [SPST_WIDTH-1:0] a,
  input  logic [SPST_WIDTH-1:0] b,
  input  logic                  sub,
  input  logic                  det_en,
  output logic [SPST_WIDTH-1:0] sum,
  output logic                  cout,
  output logic                  close,
  // wide MCC adder
  input  logic [WIDE_WIDTH-1:0] wa,
  input  logic [WIDE_WIDTH-1:0] wb,
  input  logic                  wcin,
  output logic [WIDE_WIDTH-1:0] wsum,
  output logic                  wcout
);
  spst_addsub #(.WIDTH(SPST_WIDTH)) u_spst (
    .a     (a),
    .b     (b),
    .sub   (sub),
    .det_en(det_en),
    .sum   (sum),
    .cout  (cout),
    .close (close)
  );

  mcc_wide_adder #(.WIDTH(WIDE_WIDTH)) u_wide (
    .a   (wa),
    .b   (wb),
    .cin (wcin),
    .sum (wsum),
    .cout(wcout)
  );
endmodule
