// spst_addsub: bi-partitioned adder/subtractor with spurious-power
// suppression (SPST).
//
// The WIDTH-bit operation is split into a least significant part (LSP, the
// low WIDTH/2 bits) and a most significant part (MSP, the rest), each added by
// a two-chain Manchester carry chain adder.  The LSP adder always works.  The
// MSP side has:
//   - detection logic (spst_detect) that raises close when both MSP operands
//     are all zeros or all ones, i.e. mere sign extensions;
//   - Latch-A and Latch-B in front of the MSP adder, transparent while close
//     is low and holding while it is high, so the MSP adder sees no input
//     activity when its result is not needed;
//   - a gate that blocks the LSP carry into the MSP adder while close is high;
//   - sign extension: while close is high the MSP result is
//     {sign,...,sign,carr_ctrl} from the detection logic instead of the
//     adder's (pseudo) sum, and the carry-out is derived from a_and, b_and and
//     the LSP carry.
// The result is always the exact two's complement (mod 2^WIDTH) sum, and
// cout is the unsigned carry out of the top bit, whichever path produced it.
// Subtraction (sub = 1) is a + ~b + 1: b is inverted and the carry-in is set
// before the split, so the detection logic sees the operand actually added.
// The two latches and the detection output latch are intended storage: they
// are what keeps the MSP quiet.
// Follows the design: the MSP/LSP split, detection logic, the two operand
// latches, the carry gate, the sign extension and the 16-bit size.  This
// design's own choices: how subtraction is folded in, the det_en strobe and
// the equations of the carry-out.
// Interface: a, b, sub, det_en in; sum, cout, close out.  Combinational from
// operands to result (with det_en high), with no clock.
module spst_addsub
  import spst_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  input  logic             det_en,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             close
);
  localparam int unsigned LSP_W = WIDTH / 2;
  localparam int unsigned MSP_W = WIDTH - LSP_W;

  logic [WIDTH-1:0] b_eff;
  logic [LSP_W-1:0] sum_lsp;
  logic             c_lsp;
  logic [MSP_W-1:0] a_lat, b_lat;
  logic [MSP_W-1:0] pseudo_sum;
  logic             cin_msp, cout_msp;
  logic             a_and, b_and;
  det_t             det;

  assign b_eff = b ^ {WIDTH{sub}};

  // LSP add/sub
  mcc_wide_adder #(.WIDTH(LSP_W)) u_lsp (
    .a   (a[LSP_W-1:0]),
    .b   (b_eff[LSP_W-1:0]),
    .cin (sub),
    .sum (sum_lsp),
    .cout(c_lsp)
  );

  // MSP detection logic
  spst_detect #(.MSP_W(MSP_W)) u_det (
    .a_msp (a[WIDTH-1:LSP_W]),
    .b_msp (b_eff[WIDTH-1:LSP_W]),
    .c_lsp (c_lsp),
    .det_en(det_en),
    .det   (det),
    .a_and (a_and),
    .b_and (b_and)
  );

  assign close = det.close;

  // Latch-A / Latch-B: hold the MSP operands while close is high
  always_latch begin
    if (!det.close) begin
      a_lat = a[WIDTH-1:LSP_W];
      b_lat = b_eff[WIDTH-1:LSP_W];
    end
  end

  // carry from the LSP is blocked while the MSP is closed
  assign cin_msp = c_lsp & ~det.close;

  // MSP add/sub
  mcc_wide_adder #(.WIDTH(MSP_W)) u_msp (
    .a   (a_lat),
    .b   (b_lat),
    .cin (cin_msp),
    .sum (pseudo_sum),
    .cout(cout_msp)
  );

  // sign extension and carry-out
  always_comb begin
    if (det.close) begin
      sum[WIDTH-1:LSP_W] = {{(MSP_W-1){det.sign}}, det.carr_ctrl};
      cout = (a_and & b_and) | ((a_and ^ b_and) & c_lsp);
    end else begin
      sum[WIDTH-1:LSP_W] = pseudo_sum;
      cout = cout_msp;
    end
    sum[LSP_W-1:0] = sum_lsp;
  end

  initial begin
    assert (LSP_W % 8 == 0 && MSP_W % 8 == 0)
      else $error("spst_addsub: WIDTH must be a multiple of 16");
  end
endmodule
