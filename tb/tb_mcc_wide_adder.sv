// tb_mcc_wide_adder: self-checking test of the wide adders built from 8-bit
// MCC modules, at the four sizes 8, 16, 32 and 64 bits (64 is the default).
// Directed cases make a carry travel through every module (all ones plus a
// carry-in, alternating patterns); 20000 random cases follow.  Each result
// {cout,sum} is compared with a 65-bit integer sum of the operands.
module tb_mcc_wide_adder;
  int checks = 0, failures = 0;
  logic [63:0] a, b, s64, s32, s16, s8;
  logic        cin, c64, c32, c16, c8;

  mcc_wide_adder             u64 (.a(a),        .b(b),        .cin(cin), .sum(s64),       .cout(c64));
  mcc_wide_adder #(.WIDTH(32)) u32 (.a(a[31:0]), .b(b[31:0]), .cin(cin), .sum(s32[31:0]), .cout(c32));
  mcc_wide_adder #(.WIDTH(16)) u16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .sum(s16[15:0]), .cout(c16));
  mcc_wide_adder #(.WIDTH(8))  u8  (.a(a[7:0]),  .b(b[7:0]),  .cin(cin), .sum(s8[7:0]),   .cout(c8));

  task automatic check_one(int w, logic [63:0] got_s, logic got_c);
    logic [64:0] full;
    logic [64:0] mask;
    logic [64:0] am, bm;
    mask = (65'd1 << w) - 65'd1;
    am = {1'b0, a} & mask;
    bm = {1'b0, b} & mask;
    full = am + bm + 65'(cin);
    checks++;
    if (({1'b0, got_s} & mask) !== (full & mask) || got_c !== full[w]) begin
      failures++;
      if (failures < 20)
        $display("FAIL W=%0d a=%h b=%h cin=%b sum=%h cout=%b exp=%h", w, a, b, cin, got_s, got_c, full);
    end
  endtask

  task automatic apply(logic [63:0] av, logic [63:0] bv, logic cv);
    a = av; b = bv; cin = cv;
    #1;
    check_one(64, s64, c64);
    check_one(32, s32, c32);
    check_one(16, s16, c16);
    check_one(8,  s8,  c8);
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s32 = '0; s16 = '0; s8 = '0;
    apply('1, '0, 1'b1);
    apply('1, 64'd1, 1'b0);
    apply('1, '1, 1'b1);
    apply(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    apply(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    apply('0, '0, 1'b0);
    repeat (20000) apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
