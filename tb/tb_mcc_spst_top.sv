// tb_mcc_spst_top: end-to-end test of the whole design at its default sizes
// (16-bit SPST adder/subtractor, 64-bit MCC adder).
// Every result is compared with integer arithmetic computed here.  The test
// counts each mechanism of the design and fails if one never happens:
//   suppress  - the upper half is closed and its result sign-extended
//               (each of the five operand cases and 0+0 separately)
//   open      - the upper half adds normally
//   subtract  - sub = 1
//   strobe    - det_en held low while operands change: the detection
//               outputs hold, and the result is correct once det_en rises
//   ripple64  - a carry entering bit 0 of the 64-bit adder reaches the carry
//               output through all eight 8-bit modules
//   wcout     - the 64-bit adder produces a carry-out
module tb_mcc_spst_top;
  int checks = 0, failures = 0;
  int n_suppress = 0, n_open = 0, n_sub = 0, n_strobe = 0, n_ripple = 0, n_wcout = 0;
  int case_seen [6];

  logic [15:0] a, b, sum;
  logic        sub, det_en, cout, close;
  logic [63:0] wa, wb, wsum;
  logic        wcin, wcout;

  mcc_spst_top dut (
    .a(a), .b(b), .sub(sub), .det_en(det_en), .sum(sum), .cout(cout), .close(close),
    .wa(wa), .wb(wb), .wcin(wcin), .wsum(wsum), .wcout(wcout)
  );

  function automatic logic [16:0] ref16(logic [15:0] x, logic [15:0] y, logic s);
    return {1'b0, x} + {1'b0, (s ? ~y : y)} + 17'(s);
  endfunction

  task automatic check16(string tag);
    logic [16:0] e;
    e = ref16(a, b, sub);
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%h b=%h sub=%b got %h exp %h", tag, a, b, sub, {cout, sum}, e);
    end
    if (close) n_suppress++; else n_open++;
    if (sub) n_sub++;
  endtask

  task automatic spst(logic [15:0] av, logic [15:0] bv, logic sv);
    a = av; b = bv; sub = sv;
    #1;
    check16("spst");
  endtask

  task automatic wide(logic [63:0] av, logic [63:0] bv, logic cv);
    logic [64:0] e;
    wa = av; wb = bv; wcin = cv;
    #1;
    e = {1'b0, av} + {1'b0, bv} + 65'(cv);
    checks++;
    if ({wcout, wsum} !== e) begin
      failures++;
      if (failures < 20) $display("FAIL wide a=%h b=%h cin=%b got %h exp %h", av, bv, cv, {wcout, wsum}, e);
    end
    if (wcout) n_wcout++;
    if (cv && ((av ^ bv) == '1) && wcout) n_ripple++;
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [15:0] cases_a [6] = '{16'd5, 16'd128, 16'hffc3, 16'hff3c, 16'hffc3, 16'hff3c};
    automatic logic [15:0] cases_b [6] = '{16'd7, 16'd192, 16'd51,   16'd204,  16'hff33, 16'hffcc};
    det_en = 1'b1;
    a = '0; b = '0; sub = 1'b0;
    wa = '0; wb = '0; wcin = 1'b0;

    // the suppression cases
    foreach (cases_a[i]) begin
      spst(cases_a[i], cases_b[i], 1'b0);
      checks++;
      if (!close) begin
        failures++;
        $display("FAIL case %0d not suppressed", i);
      end else case_seen[i]++;
    end

    // glitch-diminishing strobe: operands change while det_en is low
    for (int k = 0; k < 20; k++) begin
      logic old_close;
      spst(16'($urandom), 16'($urandom), 1'($urandom));
      old_close = close;
      det_en = 1'b0;
      a = (k % 2 != 0) ? 16'h0003 : 16'h4000;
      b = (k % 2 != 0) ? 16'hfff0 : 16'h0123;
      #1;
      checks++;
      if (close !== old_close) begin
        failures++;
        $display("FAIL detection output moved while det_en low");
      end
      det_en = 1'b1;
      #1;
      check16("strobe");
      n_strobe++;
    end

    // random traffic on both datapaths
    for (int k = 0; k < 30000; k++) begin
      logic [7:0] la, lb;
      la = 8'($urandom); lb = 8'($urandom);
      if (k % 3 == 0)
        spst({{8{1'($urandom)}}, la}, {{8{1'($urandom)}}, lb}, 1'($urandom));
      else
        spst(16'($urandom), 16'($urandom), 1'($urandom));
      wide({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end

    // full-length carries through the 64-bit adder
    wide('1, '0, 1'b1);
    wide(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    wide('1, '1, 1'b0);

    $display("suppress=%0d open=%0d subtract=%0d strobe=%0d ripple64=%0d wcout=%0d",
             n_suppress, n_open, n_sub, n_strobe, n_ripple, n_wcout);
    foreach (case_seen[i]) begin
      checks++;
      if (case_seen[i] == 0) begin
        failures++;
        $display("FAIL suppression case %0d never happened", i);
      end
    end
    checks++;
    if (n_suppress == 0 || n_open == 0 || n_sub == 0 || n_strobe == 0 || n_ripple == 0 || n_wcout == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
