// tb_qca_wire: drives random words into wires of 0, 1 and 4 clock zones and
// checks that each output is its input delayed by exactly that many clock
// edges, and that reset clears the zones.
module tb_qca_wire;

  localparam int W = 8;
  localparam int STEPS = 200;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst;
  logic [W-1:0] d;
  logic [W-1:0] q0, q1, q4;
  logic [W-1:0] hist [STEPS];

  always #5 clk = ~clk;

  qca_wire #(.WIDTH(W), .ZONES(0)) u_w0 (.clk, .rst, .d, .q(q0));
  qca_wire #(.WIDTH(W), .ZONES(1)) u_w1 (.clk, .rst, .d, .q(q1));
  qca_wire #(.WIDTH(W), .ZONES(4)) u_w4 (.clk, .rst, .d, .q(q4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1;
    d = '1;
    repeat (5) @(posedge clk);
    #1;
    check("reset 1 zone", q1, '0);
    check("reset 4 zones", q4, '0);
    rst = 1'b0;
    for (int j = 0; j < STEPS; j++) begin
      d = W'($urandom);
      hist[j] = d;
      #1;
      check("0 zones", q0, d);
      @(posedge clk);
      #1;
      check("1 zone", q1, hist[j]);
      if (j >= 3) check("4 zones", q4, hist[j-3]);
      else        check("4 zones filling", q4, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
