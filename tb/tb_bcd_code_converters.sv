// tb_bcd_code_converters: end-to-end test of the three converters at their
// published phase counts (3, 7 and 5 clock phases), all running at once.
//
//   1. Reset: every output reads 0000.
//   2. Latency: each converter settles on digit 0, then gets digit 9; the
//      number of clock edges until the new code appears must equal its phase
//      count.
//   3. Worked examples: gray(0110) = 0101, gray(1001) = 1101,
//      excess-3(0001) = 0100, excess-3(0100) = 0111, aiken(0010) = 0010,
//      aiken(0111) = 1101.
//   4. Streaming: independent random digits go into the three inputs on every
//      edge; every output is compared with an arithmetic reference of the
//      digit applied its phase count earlier.
// Each of these is counted; a mechanism that never happened, or a converter
// for which some digit 0..9 was never checked, counts as a failure.
module tb_bcd_code_converters;
  import qca_pkg::*;
  import tb_ref_pkg::*;

  localparam int STEPS = 2000;
  // Clock phases per full QCA clock cycle.
  localparam real PHASES_PER_CYCLE = 4.0;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst;
  bcd_t gray_bcd, xs3_bcd, aiken_bcd;
  gray_t gray_code;
  xs3_t xs3_code;
  aiken_t aiken_code;

  bcd_t hist_g [STEPS];
  bcd_t hist_e [STEPS];
  bcd_t hist_a [STEPS];

  int n_reset = 0, n_latency = 0, n_example = 0, n_stream = 0;
  int seen_g [10], seen_e [10], seen_a [10];

  always #5 clk = ~clk;

  bcd_code_converters dut (
    .clk, .rst,
    .gray_bcd, .gray_code,
    .xs3_bcd, .xs3_code,
    .aiken_bcd, .aiken_code
  );

  initial begin
    #1000000;
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

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // Hold the three inputs for long enough that every output has settled.
  task automatic settle(input bcd_t g, input bcd_t e, input bcd_t a);
    gray_bcd = g;
    xs3_bcd = e;
    aiken_bcd = a;
    repeat (XS3_PHASES + 1) tick();
  endtask

  task automatic mechanism(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("mechanism %s: %0d", what, count);
    end
  endtask

  initial begin
    // 1. Reset.
    rst = 1'b1;
    gray_bcd = 4'd9;
    xs3_bcd = 4'd9;
    aiken_bcd = 4'd9;
    repeat (3) tick();
    check("reset gray", gray_code, '0);
    check("reset excess-3", xs3_code, '0);
    check("reset aiken", aiken_code, '0);
    n_reset++;
    rst = 1'b0;

    // 2. Latency of each converter.
    settle(4'd0, 4'd0, 4'd0);
    begin
      int lat_g, lat_e, lat_a;
      lat_g = -1;
      lat_e = -1;
      lat_a = -1;
      gray_bcd = 4'd9;
      xs3_bcd = 4'd9;
      aiken_bcd = 4'd9;
      for (int e = 1; e <= 10; e++) begin
        tick();
        if (lat_g < 0 && gray_code == ref_gray(4'd9))   lat_g = e;
        if (lat_e < 0 && xs3_code == ref_xs3(4'd9))     lat_e = e;
        if (lat_a < 0 && aiken_code == ref_aiken(4'd9)) lat_a = e;
      end
      checks += 3;
      if (lat_g != int'(GRAY_PHASES))  begin failures++; $display("FAIL gray latency %0d", lat_g); end
      if (lat_e != int'(XS3_PHASES))   begin failures++; $display("FAIL excess-3 latency %0d", lat_e); end
      if (lat_a != int'(AIKEN_PHASES)) begin failures++; $display("FAIL aiken latency %0d", lat_a); end
      $display("latency in clock phases: gray %0d, excess-3 %0d, aiken %0d", lat_g, lat_e, lat_a);
      $display("latency in QCA clock cycles: gray %0.2f, excess-3 %0.2f, aiken %0.2f",
               real'(lat_g) / PHASES_PER_CYCLE, real'(lat_e) / PHASES_PER_CYCLE,
               real'(lat_a) / PHASES_PER_CYCLE);
      n_latency += 3;
    end

    // 3. Worked examples.
    settle(4'b0110, 4'b0001, 4'b0010);
    check("gray(0110)", gray_code, 4'b0101);
    check("excess-3(0001)", xs3_code, 4'b0100);
    check("aiken(0010)", aiken_code, 4'b0010);
    settle(4'b1001, 4'b0100, 4'b0111);
    check("gray(1001)", gray_code, 4'b1101);
    check("excess-3(0100)", xs3_code, 4'b0111);
    check("aiken(0111)", aiken_code, 4'b1101);
    n_example += 6;

    // 4. Streaming, one new digit per converter per edge.
    for (int j = 0; j < STEPS; j++) begin
      gray_bcd = rand_digit();
      xs3_bcd = rand_digit();
      aiken_bcd = rand_digit();
      hist_g[j] = gray_bcd;
      hist_e[j] = xs3_bcd;
      hist_a[j] = aiken_bcd;
      tick();
      if (j >= int'(GRAY_PHASES) - 1) begin
        bcd_t n;
        n = hist_g[j-int'(GRAY_PHASES)+1];
        check("stream gray", gray_code, ref_gray(n));
        seen_g[n]++;
      end
      if (j >= int'(XS3_PHASES) - 1) begin
        bcd_t n;
        n = hist_e[j-int'(XS3_PHASES)+1];
        check("stream excess-3", xs3_code, ref_xs3(n));
        seen_e[n]++;
      end
      if (j >= int'(AIKEN_PHASES) - 1) begin
        bcd_t n;
        n = hist_a[j-int'(AIKEN_PHASES)+1];
        check("stream aiken", aiken_code, ref_aiken(n));
        seen_a[n]++;
      end
      n_stream++;
    end

    mechanism("reset", n_reset);
    mechanism("latency measured", n_latency);
    mechanism("worked examples", n_example);
    mechanism("one digit per clock phase", n_stream);
    for (int n = 0; n < 10; n++) begin
      mechanism($sformatf("gray conversion of %0d", n), seen_g[n]);
      mechanism($sformatf("excess-3 conversion of %0d", n), seen_e[n]);
      mechanism($sformatf("aiken conversion of %0d", n), seen_a[n]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
