// mcc_wide_adder: a WIDTH-bit adder assembled from 8-bit two-chain MCC
// modules (mcc_adder8).
//
// The 8-bit modules are placed side by side and the carry-out of each feeds
// the carry-in of the next, so a WIDTH-bit add passes WIDTH/8 module carry
// paths.  Widths of 8, 16, 32 and 64 bits are the sizes the adder is built
// at; 64 is the default.  How the modules are joined is this design's own
// choice (a plain ripple between modules); the 8-bit module is the building
// block.
// Interface: a, b, cin in; sum, cout out.  WIDTH must be a multiple of 8.
// Purely combinational.
module mcc_wide_adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned N = WIDTH / 8;

  logic [N:0] carry;
  assign carry[0] = cin;

  for (genvar m = 0; m < N; m++) begin : g_mod
    mcc_adder8 u_add (
      .a   (a[8*m +: 8]),
      .b   (b[8*m +: 8]),
      .cin (carry[m]),
      .sum (sum[8*m +: 8]),
      .cout(carry[m+1])
    );
  end

  assign cout = carry[N];

  initial begin
    assert (WIDTH % 8 == 0 && WIDTH >= 8)
      else $error("mcc_wide_adder: WIDTH must be a positive multiple of 8");
  end
endmodule
