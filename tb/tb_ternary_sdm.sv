// tb_ternary_sdm: self-checking test of the ternary sigma-delta modulator
// (8-bit input). Each output digit is compared with an integer model of the
// first-order three-level loop, out_valid must follow in_valid by one clock,
// clear must restart the loop, and for constant inputs the mean of the
// ternary stream must match the input as a fraction of full scale.
module tb_ternary_sdm;
  localparam int IN_W = 8;
  localparam int FS   = 1 << (IN_W - 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   seen_pos = 0, seen_neg = 0, seen_zero = 0;

  logic                   clear, in_valid, out_valid;
  logic signed [IN_W-1:0] x;
  logic signed [1:0]      y;

  always #5 clk = ~clk;

  ternary_sdm dut (.clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
                   .x(x), .out_valid(out_valid), .y(y));

  int model_s = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference: v = s + x; y = +1 if v > FS/2, -1 if v < -FS/2, else 0; s = v - y*FS
  function automatic int model_step(input int xv);
    int v = model_s + xv;
    int yv = (v > FS / 2) ? 1 : (v < -FS / 2) ? -1 : 0;
    model_s = v - yv * FS;
    return yv;
  endfunction

  // one sample, checked against the model; returns the ternary digit
  task automatic send(input int xv, output int yv);
    int expv;
    x <= IN_W'(xv); in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    expv = model_step(xv);
    #1;
    yv = int'(y);
    check(out_valid, "out_valid missing one clock after in_valid");
    check(yv == expv, $sformatf("x=%0d: y=%0d expected %0d", xv, yv, expv));
    if (yv > 0) seen_pos++; else if (yv < 0) seen_neg++; else seen_zero++;
  endtask

  initial begin
    int yv, acc;
    clear = 1'b0; in_valid = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(!out_valid, "out_valid without input");
    // random samples, back to back and with gaps
    for (int i = 0; i < 400; i++) begin
      send($signed(IN_W'($urandom)), yv);
      if ($urandom_range(3) == 0) begin
        @(posedge clk); #1;
        check(!out_valid, "out_valid held without input");
      end
    end
    // constant inputs: mean of the digits over 256 samples tracks x/FS
    for (int t = 0; t < 5; t++) begin
      int xc;
      case (t)
        0: xc = 0;
        1: xc = FS / 2;
        2: xc = -FS / 4;
        3: xc = FS - 1;
        default: xc = -FS;
      endcase
      clear <= 1'b1; @(posedge clk); clear <= 1'b0;
      model_s = 0;
      acc = 0;
      for (int i = 0; i < 256; i++) begin
        send(xc, yv);
        acc += yv;
      end
      // |sum(y)*FS - sum(x)| <= FS/2 + FS/2 (integrator bound)
      check((acc * FS - 256 * xc) <= FS && (256 * xc - acc * FS) <= FS,
            $sformatf("mean for x=%0d: sum of digits %0d", xc, acc));
    end
    check(seen_pos > 0 && seen_neg > 0 && seen_zero > 0, "not all three digits produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
