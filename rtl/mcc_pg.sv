// mcc_pg: per-bit carry generate and propagate signals of the adder.
//
// For every bit position i the cell forms
//   g[i] = a[i] & b[i]   carry generate
//   p[i] = a[i] ^ b[i]   EXCLUSIVE-OR propagate (used for the sum bits)
//   t[i] = a[i] | b[i]   INCLUSIVE-OR propagate (used along the carry chains)
// These are the three signals the adder's domino front end produces.  In a
// dynamic implementation each is a precharged gate evaluated by the clock;
// here they are plain combinational logic with no latency.
// Interface: W-bit operands a, b in, three W-bit vectors out.  Purely
// combinational.
module mcc_pg #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] g,
  output logic [W-1:0] p,
  output logic [W-1:0] t
);
  always_comb begin
    g = a & b;
    p = a ^ b;
    t = a | b;
  end
endmodule
