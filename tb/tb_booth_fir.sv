// tb_booth_fir: self-checking test of the 8-tap Booth FIR filter with 2-bit
// words, the short-word-length configuration. See fir_check_harness for
// what is driven and checked.
module tb_booth_fir;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks, failures;
  logic done;

  always #5 clk = ~clk;

  fir_check_harness #(.TAPS(8), .W(2), .NS(400)) h (
    .clk(clk), .rst_n(rst_n), .checks(checks), .failures(failures), .done(done));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
