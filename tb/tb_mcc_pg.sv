// tb_mcc_pg: self-checking test of the generate/propagate cell.
// Drives 2000 random operand pairs plus all-zero/all-one corners into an
// 8-bit and a 16-bit instance and compares g, p and t with bitwise
// references computed bit by bit in the testbench.
module tb_mcc_pg;
  int checks = 0, failures = 0;
  logic [7:0]  a8, b8, g8, p8, t8;
  logic [15:0] a16, b16, g16, p16, t16;

  mcc_pg #(.W(8))  u8  (.a(a8),  .b(b8),  .g(g8),  .p(p8),  .t(t8));
  mcc_pg #(.W(16)) u16 (.a(a16), .b(b16), .g(g16), .p(p16), .t(t16));

  task automatic check8();
    for (int i = 0; i < 8; i++) begin
      logic eg, ep, et;
      eg = (a8[i] == 1'b1 && b8[i] == 1'b1);
      ep = (a8[i] != b8[i]);
      et = (a8[i] == 1'b1 || b8[i] == 1'b1);
      checks++;
      if (g8[i] !== eg || p8[i] !== ep || t8[i] !== et) begin
        failures++;
        $display("FAIL W=8 bit %0d a=%h b=%h g=%h p=%h t=%h", i, a8, b8, g8, p8, t8);
      end
    end
  endtask

  task automatic check16();
    for (int i = 0; i < 16; i++) begin
      logic eg, ep, et;
      eg = (a16[i] == 1'b1 && b16[i] == 1'b1);
      ep = (a16[i] != b16[i]);
      et = (a16[i] == 1'b1 || b16[i] == 1'b1);
      checks++;
      if (g16[i] !== eg || p16[i] !== ep || t16[i] !== et) begin
        failures++;
        $display("FAIL W=16 bit %0d a=%h b=%h", i, a16, b16);
      end
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [15:0] corners [4] = '{16'h0000, 16'hffff, 16'h5555, 16'haaaa};
    foreach (corners[i]) foreach (corners[j]) begin
      a8 = corners[i][7:0]; b8 = corners[j][7:0];
      a16 = corners[i]; b16 = corners[j];
      #1; check8(); check16();
    end
    repeat (2000) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1; check8(); check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
