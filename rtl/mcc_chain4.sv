// mcc_chain4: one four-stage Manchester carry chain.
//
// Each stage k passes the previous node value through when its propagate
// P[k] is high and forces the node high when its generate G[k] is high:
//   h[0] = G[0] | (P[0] & h_in)
//   h[k] = G[k] | (P[k] & h[k-1])      k = 1..3
// Four stages is the chain length the 4-bit Manchester chain also has, so
// the longest series path is unchanged.  The 8-bit adder uses two of these
// chains side by side: one for the even pseudo-carries h0,h2,h4,h6 and one
// for the odd ones h1,h3,h5,h7.  In a domino circuit the nodes are
// precharged and discharged; here the evaluated logic value is modelled.
// Interface: 4-bit G and P, chain input h_in, 4-bit node outputs h.
// Purely combinational.
module mcc_chain4 (
  input  logic [3:0] G,
  input  logic [3:0] P,
  input  logic       h_in,
  output logic [3:0] h
);
  logic [4:0] node;   // node[0] is the chain input, node[k+1] = h[k]

  assign node[0] = h_in;
  for (genvar k = 0; k < 4; k++) begin : g_stage
    assign node[k+1] = G[k] | (P[k] & node[k]);
  end
  assign h = node[4:1];
endmodule
