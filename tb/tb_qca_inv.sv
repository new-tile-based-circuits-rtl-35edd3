// tb_qca_inv: checks the NOT gate for both input values.
module tb_qca_inv;

  int checks = 0, failures = 0;
  logic a, y;

  qca_inv dut (.a, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      a = 1'(v);
      #1;
      checks++;
      if (y !== ~a) begin
        failures++;
        $display("FAIL a=%b y=%b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
