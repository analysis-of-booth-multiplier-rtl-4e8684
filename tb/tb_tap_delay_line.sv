// tb_tap_delay_line: self-checking test of the tap delay line at its default
// size (8 words of 2 bits). A queue models the line: after every enabled
// clock taps[k] must hold the k-th most recent input, and with en low the
// line must hold still.
module tb_tap_delay_line;
  localparam int L = 8;
  localparam int W = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic                en;
  logic signed [W-1:0] din;
  logic signed [W-1:0] taps [L];
  logic signed [W-1:0] hist [L];

  always #5 clk = ~clk;

  tap_delay_line dut (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .taps(taps));

  initial begin
    en = 1'b0; din = '0;
    for (int k = 0; k < L; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      logic e;
      logic signed [W-1:0] d;
      e = ($urandom_range(3) != 0);
      d = W'($urandom);
      en <= e; din <= d;
      @(posedge clk); #1;
      if (e) begin
        for (int k = L - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = d;
      end
      for (int k = 0; k < L; k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin
          failures++;
          $display("FAIL: step %0d tap %0d = %0d expected %0d", i, k, taps[k], hist[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
