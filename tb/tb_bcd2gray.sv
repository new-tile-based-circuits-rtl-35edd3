// tb_bcd2gray: self-checking test of the BCD to gray converter.
//
// Two instances run side by side: one with the published phase count and one
// with two extra wire zones. For each the test
//   - converts every digit 0..9 one at a time and compares with a reference
//     computed arithmetically (tb_ref_pkg), also checking the worked examples,
//   - checks that the result appears exactly PHASES clock edges after the
//     digit is applied (one edge per QCA clock phase),
//   - streams random digits at one per edge and checks every output,
//   - checks that consecutive digits 0..9 differ in exactly one gray bit.
module tb_bcd2gray;
  import qca_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned P0 = GRAY_PHASES;
  localparam int unsigned P1 = GRAY_PHASES + 2;
  localparam int STEPS = 400;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst;
  bcd_t bcd;
  gray_t y0, y1;
  bcd_t hist [STEPS];
  logic [3:0] code_of [10];

  always #5 clk = ~clk;

  bcd2gray dut0 (.clk, .rst, .bcd, .gray(y0));
  bcd2gray #(.PHASES(P1)) dut1 (.clk, .rst, .bcd, .gray(y1));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  // Apply one digit, hold it, and check that its code appears exactly P0
  // (dut0) and P1 (dut1) edges later, the outputs having shown the code of
  // the previous digit until then.
  task automatic convert_and_check(input bcd_t n, input logic [3:0] exp, input string what);
    logic [3:0] prev0, prev1;
    prev0 = y0;
    prev1 = y1;
    bcd = n;
    for (int unsigned e = 1; e <= P1; e++) begin
      @(posedge clk);
      #1;
      if (e < P0)  check("dut0 before latency", y0, prev0);
      if (e == P0) check(what, y0, exp);
      if (e < P1)  check("dut1 before latency", y1, prev1);
      if (e == P1) check(what, y1, exp);
    end
  endtask

  initial begin
    rst = 1'b1;
    bcd = 4'd9;
    repeat (3) @(posedge clk);
    #1;
    check("reset dut0", y0, '0);
    check("reset dut1", y1, '0);
    rst = 1'b0;
    // Start from a settled pipeline holding digit 0.
    bcd = 4'd0;
    repeat (P1) @(posedge clk);
    #1;
    for (int n = 0; n < 10; n++) begin
      convert_and_check(4'(n), ref_gray(4'(n)), $sformatf("digit %0d", n));
      code_of[n] = y0;
    end
    convert_and_check(4'b0110, 4'b0101, "worked example");
    convert_and_check(4'b1001, 4'b1101, "worked example");
    // Neighbouring digits differ in exactly one gray bit.
    for (int n = 0; n < 9; n++) begin
      checks++;
      if ($countones(code_of[n] ^ code_of[n+1]) != 1) begin
        failures++;
        $display("FAIL gray of %0d and %0d differ in more than one bit", n, n + 1);
      end
    end
    // Random digits, one per edge.
    for (int j = 0; j < STEPS; j++) begin
      bcd = rand_digit();
      hist[j] = bcd;
      @(posedge clk);
      #1;
      if (j >= int'(P0) - 1) check("stream dut0", y0, ref_gray(hist[j-int'(P0)+1]));
      if (j >= int'(P1) - 1) check("stream dut1", y1, ref_gray(hist[j-int'(P1)+1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
