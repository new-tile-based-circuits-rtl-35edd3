// tb_qca_maj: exhaustive test of the majority gate with every input-inversion
// setting, against a count of the ones among the (possibly inverted) inputs.
// Also checks the AND and OR forms Maj(a,b,0) and Maj(a,b,1).
module tb_qca_maj;

  int checks = 0, failures = 0;
  logic a, b, c;
  logic [7:0] y;

  for (genvar k = 0; k < 8; k++) begin : g_inv
    qca_maj #(.INV(3'(k))) dut (.a, .b, .c, .y(y[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c, b, a} = 3'(v);
      #1;
      for (int k = 0; k < 8; k++) begin
        int ones;
        logic [2:0] x;
        x = 3'(v) ^ 3'(k);
        ones = int'(x[0]) + int'(x[1]) + int'(x[2]);
        checks++;
        if (y[k] !== (ones >= 2)) begin
          failures++;
          $display("FAIL INV=%b a=%b b=%b c=%b y=%b", 3'(k), a, b, c, y[k]);
        end
      end
      // AND / OR forms with the un-inverted gate.
      checks++;
      if (c == 1'b0 && y[0] !== (a & b)) begin
        failures++;
        $display("FAIL AND form a=%b b=%b", a, b);
      end
      checks++;
      if (c == 1'b1 && y[0] !== (a | b)) begin
        failures++;
        $display("FAIL OR form a=%b b=%b", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
