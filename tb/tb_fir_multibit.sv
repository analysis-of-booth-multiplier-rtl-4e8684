// tb_fir_multibit: runs the same 8-tap Booth FIR filter with 6-, 8- and
// 10-bit data and coefficients, the conventional multi-bit configurations
// the short-word-length filter is compared against, and checks every output
// against an integer convolution (see fir_check_harness).
module tb_fir_multibit;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c6, f6, c8, f8, c10, f10;
  logic d6, d8, d10;

  always #5 clk = ~clk;

  fir_check_harness #(.TAPS(8), .W(6),  .NS(150)) h6  (.clk(clk), .rst_n(rst_n), .checks(c6),  .failures(f6),  .done(d6));
  fir_check_harness #(.TAPS(8), .W(8),  .NS(150)) h8  (.clk(clk), .rst_n(rst_n), .checks(c8),  .failures(f8),  .done(d8));
  fir_check_harness #(.TAPS(8), .W(10), .NS(150)) h10 (.clk(clk), .rst_n(rst_n), .checks(c10), .failures(f10), .done(d10));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (d6 && d8 && d10);
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c8 + c10, f6 + f8 + f10);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c6 + c8 + c10, f6 + f8 + f10 + 1);
    $finish;
  end
endmodule
