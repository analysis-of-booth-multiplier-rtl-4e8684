// tb_booth_multiplier: self-checking test of the sequential Booth multiplier.
// The 2-bit default instance is tested on all 16 operand pairs, 6-, 8- and
// 10-bit instances (the widths of the conventional multi-bit filters) on
// corner cases and random pairs. Every product is compared with the integer
// product, and the number of clocks from start to done must equal the
// operand width.
module tb_booth_multiplier;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // default instance, N = 2
  logic              s2, busy2, done2;
  logic signed [1:0] a2, b2;
  logic signed [3:0] p2;
  booth_multiplier dut2 (.clk(clk), .rst_n(rst_n), .start(s2), .multiplicand(a2),
                         .multiplier(b2), .busy(busy2), .done(done2), .product(p2));

  // conventional widths
  int   c6, f6, c8, f8, c10, f10;
  logic d6, d8, d10;
  booth_rand_checker #(.N(6),  .NT(300)) chk6  (.clk(clk), .rst_n(rst_n), .checks(c6),  .failures(f6),  .done(d6));
  booth_rand_checker #(.N(8),  .NT(500)) chk8  (.clk(clk), .rst_n(rst_n), .checks(c8),  .failures(f8),  .done(d8));
  booth_rand_checker #(.N(10), .NT(300)) chk10 (.clk(clk), .rst_n(rst_n), .checks(c10), .failures(f10), .done(d10));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run2(input int m, input int q);
    int cyc = 0;
    a2 <= 2'(m); b2 <= 2'(q); s2 <= 1'b1;
    @(posedge clk);
    s2 <= 1'b0;
    do begin
      @(posedge clk); #1;
      cyc++;
    end while (!done2 && cyc < 20);
    #1;
    check(p2 == 4'(m * q), $sformatf("N=2 %0d*%0d gave %0d", m, q, p2));
    check(cyc == 2, $sformatf("N=2 latency %0d, expected 2", cyc));
    check(!busy2, "N=2 busy after done");
  endtask

  initial begin
    s2 = 1'b0; a2 = '0; b2 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int m = -2; m <= 1; m++)
      for (int q = -2; q <= 1; q++) run2(m, q);
    // product holds until the next start
    repeat (3) @(posedge clk);
    check(p2 == 4'(1 * 1), "N=2 product not held");
    // start ignored while busy: the second operand pair must not disturb the first
    a2 <= 2'sd1; b2 <= -2'sd2; s2 <= 1'b1;
    @(posedge clk);
    a2 <= -2'sd1; b2 <= -2'sd1;
    @(posedge clk);
    s2 <= 1'b0;
    @(posedge clk); #1;
    check(done2 && p2 == -4'sd2, "N=2 start while busy disturbed result");
    @(posedge clk);
    wait (d6 && d8 && d10);
    checks += c6 + c8 + c10;
    failures += f6 + f8 + f10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    checks += c6 + c8 + c10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
