// tb_spst_addsub: self-checking test of the 16-bit SPST adder/subtractor.
// Every result is compared with integer arithmetic: sum = (a + (sub ? ~b : b)
// + sub) mod 2^16 and cout = bit 16 of that sum.  The stimulus covers:
//   - the five suppression cases (positive+positive with LSP carry,
//     positive+negative without/with carry, negative+negative without/with
//     carry) and 0+0, each checked to raise close;
//   - operand pairs that do not allow suppression (close must stay low);
//   - subtraction;
//   - 60000 random pairs: free, sign-extended, and with upper halves
//     of all zeros or all ones independent of the lower halves;
//   - suppression itself: while close stays high, changing the operands must
//     not change the MSP adder's latched inputs.
// It also counts how often each path was taken and fails if one never was.
module tb_spst_addsub;
  int checks = 0, failures = 0;
  int n_close = 0, n_open = 0, n_sub = 0, n_quiet = 0;
  int case_seen [6];
  logic [15:0] a, b, sum;
  logic        sub, det_en, cout, close;

  spst_addsub dut (.a(a), .b(b), .sub(sub), .det_en(det_en),
                   .sum(sum), .cout(cout), .close(close));

  function automatic logic [16:0] ref_sum(logic [15:0] x, logic [15:0] y, logic s);
    logic [16:0] yy;
    yy = {1'b0, s ? ~y : y};
    return {1'b0, x} + yy + 17'(s);
  endfunction

  task automatic apply(logic [15:0] av, logic [15:0] bv, logic sv);
    logic [16:0] e;
    logic [15:0] be;
    a = av; b = bv; sub = sv;
    #1;
    e = ref_sum(av, bv, sv);
    be = sv ? ~bv : bv;
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h sub=%b got %h exp %h close=%b", av, bv, sv, {cout, sum}, e, close);
    end
    checks++;
    if (close !== ((av[15:8] == 8'h00 || av[15:8] == 8'hff) && (be[15:8] == 8'h00 || be[15:8] == 8'hff))) begin
      failures++;
      $display("FAIL close flag a=%h b=%h sub=%b close=%b", av, bv, sv, close);
    end
    if (close) n_close++; else n_open++;
    if (sv) n_sub++;
  endtask

  // suppression case index: 0 = 0+0 no carry, 1 = pos+pos with LSP carry,
  // 2/3 = neg+pos without/with carry, 4/5 = neg+neg without/with carry
  task automatic apply_case(int idx, logic [15:0] av, logic [15:0] bv);
    apply(av, bv, 1'b0);
    checks++;
    if (!close) begin
      failures++;
      $display("FAIL case %0d not suppressed", idx);
    end else case_seen[idx]++;
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] la, lb;
    det_en = 1'b1;
    foreach (case_seen[i]) case_seen[i] = 0;
    apply_case(0, 16'd5, 16'd7);
    apply_case(1, 16'd128, 16'd192);           // 128 + 192 = 320: LSP carry
    apply_case(2, 16'hffc3, 16'd51);           // -61 + 51
    apply_case(3, 16'hff3c, 16'd204);          // -196 + 204
    apply_case(4, 16'hffc3, 16'hff33);         // -61 + -205
    apply_case(5, 16'hff3c, 16'hffcc);         // -196 + -52
    apply(16'h1234, 16'h0001, 1'b0);
    apply(16'h7fff, 16'h0001, 1'b0);
    apply(16'h0000, 16'h0001, 1'b1);           // 0 - 1
    apply(16'h8000, 16'h0001, 1'b1);
    apply(16'h0100, 16'h0001, 1'b1);
    repeat (20000) apply(16'($urandom), 16'($urandom), 1'($urandom));
    repeat (20000) begin
      la = 8'($urandom); lb = 8'($urandom);
      apply({{8{la[7]}} ^ {7'b0, 1'($urandom)}, la}, {{8{lb[7]}}, lb}, 1'($urandom));
    end
    // upper halves all zeros or all ones regardless of the lower halves
    repeat (20000)
      apply({{8{1'($urandom)}}, 8'($urandom)}, {{8{1'($urandom)}}, 8'($urandom)}, 1'($urandom));
    // while close stays high the MSP adder inputs must not move
    apply(16'h1234, 16'h4321, 1'b0);           // open: latches load 12 / 43
    apply(16'h0011, 16'hff22, 1'b0);           // closed
    begin
      logic [7:0] qa, qb;
      qa = dut.a_lat; qb = dut.b_lat;
      for (int k = 0; k < 50; k++) begin
        apply({8'h00, 8'($urandom)}, {8'hff, 8'($urandom)}, 1'b0);
        checks++;
        if (dut.a_lat !== qa || dut.b_lat !== qb) begin
          failures++;
          $display("FAIL MSP adder inputs moved while closed");
        end else n_quiet++;
      end
    end
    $display("closed=%0d open=%0d sub=%0d quiet=%0d", n_close, n_open, n_sub, n_quiet);
    foreach (case_seen[i]) begin
      checks++;
      if (case_seen[i] == 0) begin
        failures++;
        $display("FAIL suppression case %0d never seen", i);
      end
    end
    checks++;
    if (n_close == 0 || n_open == 0 || n_sub == 0 || n_quiet == 0) begin
      failures++;
      $display("FAIL a path was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
