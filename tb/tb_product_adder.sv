// tb_product_adder: self-checking test of the product adder at its default
// size (8 products of 4 bits, 7-bit sum). Extreme operand sets that need the
// full output range and random sets are summed by the testbench as integers
// and compared with the adder's output.
module tb_product_adder;
  localparam int L  = 8;
  localparam int PW = 4;
  localparam int OW = 7;

  int checks = 0;
  int failures = 0;

  logic signed [PW-1:0] prod [L];
  logic signed [OW-1:0] sum;

  product_adder dut (.prod(prod), .sum(sum));

  task automatic apply_and_check(input string what);
    int ref_sum = 0;
    for (int k = 0; k < L; k++) ref_sum += int'(prod[k]);
    #1;
    checks++;
    if (int'(sum) != ref_sum) begin
      failures++;
      $display("FAIL: %s: sum %0d expected %0d", what, sum, ref_sum);
    end
  endtask

  initial begin
    for (int k = 0; k < L; k++) prod[k] = -(1 <<< (PW - 1));
    apply_and_check("all most negative");
    for (int k = 0; k < L; k++) prod[k] = (1 << (PW - 1)) - 1;
    apply_and_check("all most positive");
    for (int k = 0; k < L; k++) prod[k] = (k % 2 == 0) ? 4'sd1 : -4'sd1;
    apply_and_check("alternating ternary");
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < L; k++) prod[k] = PW'($urandom);
      apply_and_check($sformatf("random set %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
