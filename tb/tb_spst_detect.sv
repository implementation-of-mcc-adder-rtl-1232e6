// tb_spst_detect: self-checking test of the SPST detection logic (8-bit MSP).
// With det_en high every combination of the two MSP operands and the LSP
// carry is applied.  The reference: close must be high exactly when each
// operand is 8'h00 or 8'hff; when it is, the predicted MSP result
// {sign x7, carr_ctrl} must equal (a_msp + b_msp + c_lsp) mod 256 computed
// with integers.  a_and/b_and are checked against "operand == 8'hff".
// A second phase lowers det_en, changes the operands and checks that the
// three outputs hold, then raises det_en and checks that they follow.
module tb_spst_detect;
  import spst_pkg::*;
  int checks = 0, failures = 0;
  int n_close = 0;
  logic [7:0] a_msp, b_msp;
  logic       c_lsp, det_en, a_and, b_and;
  det_t       det;

  spst_detect dut (.a_msp(a_msp), .b_msp(b_msp), .c_lsp(c_lsp), .det_en(det_en),
                   .det(det), .a_and(a_and), .b_and(b_and));

  task automatic check_comb();
    logic exp_close;
    logic [7:0] exp_msp, got_msp;
    exp_close = (a_msp == 8'h00 || a_msp == 8'hff) && (b_msp == 8'h00 || b_msp == 8'hff);
    checks++;
    if (det.close !== exp_close || a_and !== (a_msp == 8'hff) || b_and !== (b_msp == 8'hff)) begin
      failures++;
      $display("FAIL close a=%h b=%h c=%b close=%b", a_msp, b_msp, c_lsp, det.close);
    end
    if (exp_close) begin
      n_close++;
      exp_msp = 8'(int'(a_msp) + int'(b_msp) + int'(c_lsp));
      got_msp = {{7{det.sign}}, det.carr_ctrl};
      checks++;
      if (got_msp !== exp_msp) begin
        failures++;
        $display("FAIL sign-ext a=%h b=%h c=%b got %h exp %h", a_msp, b_msp, c_lsp, got_msp, exp_msp);
      end
    end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    det_t held;
    det_en = 1'b1;
    for (int v = 0; v < (1 << 17); v++) begin
      {c_lsp, b_msp, a_msp} = 17'(v);
      #1;
      check_comb();
    end
    // glitch-diminishing latch: outputs hold while det_en is low
    a_msp = 8'hff; b_msp = 8'hff; c_lsp = 1'b0;   // close, sign 1, carr 0
    #1;
    held = det;
    det_en = 1'b0;
    #1;
    a_msp = 8'h00; b_msp = 8'h00; c_lsp = 1'b1;   // close, sign 0, carr 1
    #1;
    checks++;
    if (det !== held) begin
      failures++;
      $display("FAIL det changed while det_en low");
    end
    a_msp = 8'h12;                                 // not closed
    #1;
    checks++;
    if (det !== held) begin
      failures++;
      $display("FAIL det changed while det_en low (2)");
    end
    det_en = 1'b1;
    #1;
    checks++;
    if (det.close !== 1'b0) begin
      failures++;
      $display("FAIL det did not follow after det_en high");
    end
    checks++;
    if (n_close != 8) begin
      failures++;
      $display("FAIL expected 8 closed combinations, saw %0d", n_close);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
