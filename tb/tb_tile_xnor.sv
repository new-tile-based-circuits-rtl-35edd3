// tb_tile_xnor: streams random input pairs into the tile-based XNOR gate, one
// pair per clock edge, and checks that every output equals the XNOR of the
// pair applied exactly three edges (three clock phases) earlier. Also checks
// the value held under reset and that the result does not appear early.
module tb_tile_xnor;

  localparam int LATENCY = 3;
  localparam int STEPS = 300;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst;
  logic a, b, y;
  logic [1:0] hist [STEPS];

  always #5 clk = ~clk;

  tile_xnor dut (.clk, .rst, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1;
    {a, b} = 2'b10;
    repeat (4) @(posedge clk);
    #1;
    check("reset", y, 1'b0);
    rst = 1'b0;
    // Latency: settle on a pair whose result is 0, then switch to a pair
    // whose result is 1 and count the edges until it appears.
    begin
      int edges;
      edges = 0;
      {a, b} = 2'b10;
      repeat (5) @(posedge clk);
      #1;
      check("steady low", y, 1'b0);
      {a, b} = 2'b11;
      while (y !== (a ~^ b) && edges < 20) begin
        @(posedge clk);
        #1;
        edges++;
      end
      check("latency is three phases", 1'(edges == LATENCY), 1'b1);
    end
    for (int j = 0; j < STEPS; j++) begin
      {a, b} = 2'($urandom);
      hist[j] = {a, b};
      @(posedge clk);
      #1;
      if (j >= LATENCY - 1) check("stream", y, hist[j-LATENCY+1][1] ~^ hist[j-LATENCY+1][0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
