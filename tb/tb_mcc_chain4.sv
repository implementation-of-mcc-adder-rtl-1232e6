// tb_mcc_chain4: exhaustive self-checking test of the four-stage Manchester
// chain.  All 512 combinations of G, P and the chain input are applied; the
// expected node values come from the "carry reaches node k" rule: node k is
// high if some stage j <= k generates (or j = -1 is the input) and every
// stage after j up to k propagates.
module tb_mcc_chain4;
  int checks = 0, failures = 0;
  logic [3:0] G, P, h;
  logic       h_in;

  mcc_chain4 dut (.G(G), .P(P), .h_in(h_in), .h(h));

  function automatic logic [3:0] ref_chain(logic [3:0] g, logic [3:0] p, logic hi);
    logic [3:0] r;
    for (int k = 0; k < 4; k++) begin
      logic reach;
      reach = 1'b0;
      for (int j = -1; j <= k; j++) begin
        logic src, pass;
        src = (j < 0) ? hi : g[j];
        pass = 1'b1;
        for (int m = j + 1; m <= k; m++) pass = pass & p[m];
        if (src && pass) reach = 1'b1;
      end
      r[k] = reach;
    end
    return r;
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {h_in, P, G} = 9'(v);
      #1;
      checks++;
      if (h !== ref_chain(G, P, h_in)) begin
        failures++;
        $display("FAIL G=%b P=%b h_in=%b h=%b exp=%b", G, P, h_in, h, ref_chain(G, P, h_in));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
