// tb_exponent_determinant: exhaustive check of the 16-bit leading-one
// encoder. For every input the expected exponent is found by halving the
// value until it is below 2 (an independent formulation of floor(log2)).
module tb_exponent_determinant;
  localparam int unsigned W = 16;
  logic [W-1:0] value;
  logic [3:0]   exponent;
  logic         nonzero;
  int checks = 0, failures = 0;

  exponent_determinant #(.W(W)) dut (.value, .exponent, .nonzero);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      int e, t;
      value = W'(v);
      #1;
      e = 0; t = v;
      while (t > 1) begin t = t / 2; e++; end
      checks++;
      if (exponent != 4'(e) || nonzero != (v != 0)) begin
        failures++;
        if (failures < 10) $display("value=%0d exponent=%0d expected=%0d nonzero=%0b", v, exponent, e, nonzero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
