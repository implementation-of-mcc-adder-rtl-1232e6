// tb_mcc_adder8: exhaustive self-checking test of the 8-bit two-chain MCC
// adder.  All 2^17 combinations of a, b and cin are applied and {cout,sum}
// is compared with the integer sum a + b + cin.
module tb_mcc_adder8;
  int checks = 0, failures = 0;
  logic [7:0] a, b, sum;
  logic       cin, cout;

  mcc_adder8 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      int unsigned exp_val;
      {cin, b, a} = 17'(v);
      #1;
      exp_val = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} !== 9'(exp_val)) begin
        failures++;
        if (failures < 20)
          $display("FAIL a=%0d b=%0d cin=%0d got %0d exp %0d", a, b, cin, {cout, sum}, exp_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
