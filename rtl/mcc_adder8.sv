// mcc_adder8: 8-bit Manchester carry chain adder built from two independent
// 4-long carry chains.
//
// A plain Manchester chain computes c_i = g_i + t_i.c_(i-1) one bit after the
// other, so eight bits would need a chain eight devices long.  This module
// instead works with Ling pseudo-carries h_i (c_i = t_i.h_i), which obey a
// recursion that skips every other bit:
//   h_i = G_i + P_i.h_(i-2)   with G_i = g_i + g_(i-1),  P_i = t_(i-1).t_(i-2)
// The even pseudo-carries h0,h2,h4,h6 and the odd ones h1,h3,h5,h7 therefore
// form two separate chains of four stages each, evaluated in parallel.
// Chain ends: the even chain starts at G0 = g0 + cin (h0 = g0 + c_(-1)); the
// odd chain starts from the carry input itself, with P1 = t0.
// The real carries are recovered as c_i = t_i.h_i (the carry-out is t7.h7)
// and the sum bits are s_i = p_i ^ c_(i-1), s_0 = p_0 ^ cin, formed by
// static XOR gates after the dynamic chain.
// The chain structure and the signal names G, P, h follow the two-chain
// drawing of the design; the exact G/P definitions are the standard Ling
// ones that make that drawing compute a correct sum.
// Interface: a, b, cin in; sum, cout out.  Purely combinational.
module mcc_adder8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] sum,
  output logic       cout
);
  logic [7:0] g, p, t;
  logic [7:0] G, P;     // two-bit group generate / propagate
  logic [7:0] h;        // pseudo-carries
  logic [7:0] c;        // carries c0..c7
  logic [3:0] h_even, h_odd;

  mcc_pg #(.W(8)) u_pg (.a(a), .b(b), .g(g), .p(p), .t(t));

  always_comb begin
    G[0] = g[0] | cin;
    P[0] = 1'b0;
    G[1] = g[1] | g[0];
    P[1] = t[0];
    for (int i = 2; i < 8; i++) begin
      G[i] = g[i] | g[i-1];
      P[i] = t[i-1] & t[i-2];
    end
  end

  // even chain: G0, (P2,G2), (P4,G4), (P6,G6)
  mcc_chain4 u_even (
    .G   ({G[6], G[4], G[2], G[0]}),
    .P   ({P[6], P[4], P[2], P[0]}),
    .h_in(1'b0),
    .h   (h_even)
  );
  // odd chain: cin, (P1,G1), (P3,G3), (P5,G5), (P7,G7)
  mcc_chain4 u_odd (
    .G   ({G[7], G[5], G[3], G[1]}),
    .P   ({P[7], P[5], P[3], P[1]}),
    .h_in(cin),
    .h   (h_odd)
  );

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      h[2*k]   = h_even[k];
      h[2*k+1] = h_odd[k];
    end
    c      = t & h;
    sum[0] = p[0] ^ cin;
    for (int i = 1; i < 8; i++)
      sum[i] = p[i] ^ c[i-1];
    cout   = c[7];
  end
endmodule
