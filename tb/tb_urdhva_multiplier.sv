// tb_urdhva_multiplier: exhaustive at 6 bits, then random and corner
// operands at the 15-bit width used for the residues. The reference is the
// plain integer product.
module tb_urdhva_multiplier;
  logic [5:0]  a6, b6;
  logic [11:0] p6;
  logic [14:0] a15, b15;
  logic [29:0] p15;
  int checks = 0, failures = 0;

  urdhva_multiplier #(.W(6))  dut6  (.a(a6),  .b(b6),  .p(p6));
  urdhva_multiplier #(.W(15)) dut15 (.a(a15), .b(b15), .p(p15));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j);
        #1;
        checks++;
        if (int'(p6) != i * j) begin
          failures++;
          if (failures < 10) $display("6b: %0d*%0d=%0d", i, j, p6);
        end
      end
    for (int n = 0; n < 5000; n++) begin
      longint expected;
      case (n)
        0: begin a15 = '1; b15 = '1; end
        1: begin a15 = '1; b15 = '0; end
        2: begin a15 = 15'd16384; b15 = 15'd16384; end
        3: begin a15 = 15'd325;   b15 = 15'd738;   end  // worked example: 239850
        default: begin a15 = 15'($urandom); b15 = 15'($urandom); end
      endcase
      #1;
      expected = longint'(a15) * longint'(b15);
      checks++;
      if (longint'(p15) != expected) begin
        failures++;
        if (failures < 10) $display("15b: %0d*%0d=%0d expected %0d", a15, b15, p15, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
