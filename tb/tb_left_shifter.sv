// tb_left_shifter: every shift amount 0..31 of a 15-bit input into a 35-bit
// output, with random inputs, against value * 2^amount modulo 2^35.
module tb_left_shifter;
  localparam int unsigned IN_W = 15, OUT_W = 35, SH_W = 5;
  logic [IN_W-1:0]  in;
  logic [SH_W-1:0]  amount;
  logic [OUT_W-1:0] out;
  int checks = 0, failures = 0;

  left_shifter #(.IN_W(IN_W), .OUT_W(OUT_W), .SH_W(SH_W)) dut (.in, .amount, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      for (int s = 0; s < (1 << SH_W); s++) begin
        longint expected;
        in     = (n == 0) ? '1 : IN_W'($urandom);
        amount = SH_W'(s);
        #1;
        expected = (longint'(in) * (longint'(1) << s)) % (longint'(1) << OUT_W);
        checks++;
        if (longint'(out) != expected) begin
          failures++;
          if (failures < 10) $display("in=%0d amount=%0d out=%0d expected=%0d", in, s, out, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
