// fir_check_harness: reusable stimulus and checker for booth_fir, used by
// the filter testbenches. It drives random W-bit samples and random W-bit
// coefficient sets into a booth_fir of the given size, sometimes offering
// the next sample while the filter is still busy (so it must wait on
// in_ready), sometimes leaving idle gaps. A monitor keeps the sample
// history and computes y[n] = sum f[k] x[n-k] as integers at each accepted
// sample; every y_out is compared with it. It also checks that y_valid comes
// W+2 clocks after the sample was taken, that back-to-back samples are taken
// every W+3 clocks, and that in_ready is low while a sample is in flight.
// When NS samples have been checked, done rises and checks/failures hold the
// totals.
module fir_check_harness #(
  parameter int TAPS = 8,
  parameter int W    = 2,
  parameter int NS   = 200
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int OW = 2 * W + $clog2(TAPS);

  logic                 in_valid, in_ready, y_valid;
  logic signed [W-1:0]  x_in;
  logic signed [W-1:0]  coef [TAPS];
  logic signed [OW-1:0] y_out;

  booth_fir #(.TAPS(TAPS), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .x_in(x_in),
    .coef(coef), .y_valid(y_valid), .y_out(y_out));

  int hist [TAPS];
  int exp_q [$];
  int acc_cycle_q [$];
  int cycle = 0;
  int acc_count = 0;
  int last_acc = -1;
  int waited = 0;     // clocks a sample was offered but not taken
  int b2b = 0;        // back-to-back accepts seen

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (W=%0d): %s", W, what);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
  end

  // monitor: samples the handshake as it was just before each edge
  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (exp_q.size() > 0 && !y_valid) check(!in_ready, "in_ready high while busy");
      if (in_valid && !in_ready) waited++;
      if (y_valid) begin
        check(exp_q.size() > 0, "y_valid with no sample in flight");
        if (exp_q.size() > 0) begin
          int e, c;
          e = exp_q.pop_front();
          c = acc_cycle_q.pop_front();
          check(int'(y_out) == e, $sformatf("y=%0d expected %0d", y_out, e));
          check(cycle - c == W + 3, $sformatf("latency %0d clocks, expected %0d", cycle - c - 1, W + 2));
        end
      end
      if (in_valid && in_ready) begin
        int s;
        s = 0;
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x_in);
        for (int k = 0; k < TAPS; k++) s += int'(coef[k]) * hist[k];
        exp_q.push_back(s);
        acc_cycle_q.push_back(cycle);
        if (last_acc >= 0 && cycle - last_acc < W + 3)
          check(0, $sformatf("samples taken %0d clocks apart", cycle - last_acc));
        if (last_acc >= 0 && cycle - last_acc == W + 3) b2b++;
        last_acc = cycle;
        acc_count++;
      end
    end
  end

  initial begin
    done = 1'b0;
    in_valid = 1'b0;
    x_in = '0;
    for (int k = 0; k < TAPS; k++) coef[k] = W'($urandom);
    wait (rst_n);
    @(posedge clk); #1;
    for (int i = 0; i < NS; i++) begin
      int n0;
      bit eager;
      eager = (i > 0) && ($urandom_range(1) == 1);
      if (!eager) begin
        wait (exp_q.size() == 0);
        @(posedge clk); #1;
        repeat ($urandom_range(2)) begin @(posedge clk); #1; end
        if ($urandom_range(3) == 0)
          for (int k = 0; k < TAPS; k++) coef[k] = W'($urandom);
      end
      in_valid = 1'b1;
      x_in = W'($urandom);
      n0 = acc_count;
      do begin @(posedge clk); #1; end while (acc_count == n0);
      in_valid = 1'b0;
    end
    wait (exp_q.size() == 0);
    @(posedge clk); #1;
    check(waited > 0, "no sample ever had to wait on in_ready");
    check(b2b > 0, "no back-to-back samples at the full rate");
    check(acc_count == NS, "sample count");
    done = 1'b1;
  end
endmodule
