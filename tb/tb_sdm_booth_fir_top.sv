// tb_sdm_booth_fir_top: end-to-end, self-checking test of the
// short-word-length FIR filter at its default size (8 taps, 8-bit samples
// and weights, ternary digits inside).
//
// The testbench loads a set of 8 weights, streams random samples, reloads a
// new weight set while samples keep flowing, and streams more. Its own
// integer models of the two sigma-delta modulators, the coefficient line and
// the convolution predict every output, which is compared with y_out. It also
// checks the timing (output 5 clocks after the sample is taken, one sample
// per 6 clocks at full rate) and counts that each mechanism happened: weight
// load, weight reload during filtering, a sample held back by x_ready,
// back-to-back samples, and all three ternary digits in the data stream.
module tb_sdm_booth_fir_top;
  localparam int TAPS = 8;
  localparam int IN_W = 8;
  localparam int FS   = 1 << (IN_W - 1);
  localparam int NS   = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic                   x_valid, x_ready, w_clear, w_valid, y_valid;
  logic signed [IN_W-1:0] x_in, w_in;
  logic signed [6:0]      y_out;

  always #5 clk = ~clk;

  sdm_booth_fir_top dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(x_ready), .x_in(x_in),
    .w_clear(w_clear), .w_valid(w_valid), .w_in(w_in), .y_valid(y_valid), .y_out(y_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- reference model -------------------------------------------------
  int xs_state = 0, ws_state = 0;     // modulator integrators
  int line [TAPS];                    // coefficient line, line[0] newest
  int hist [TAPS];                    // ternary data history, hist[0] newest
  bit xd_valid = 0, start_pend = 0, wd_valid = 0;
  int xd = 0, wd = 0;
  int exp_q [$];
  int acc_q [$];
  int cycle = 0, acc_count = 0, last_acc = -1, out_count = 0;
  int n_wait = 0, n_b2b = 0, n_loads = 0, n_reload_live = 0;
  int n_pos = 0, n_zero = 0, n_neg = 0;

  // three-level quantizer of the modulator model
  function automatic int tern_q(input int v);
    return (v > FS / 2) ? 1 : (v < -FS / 2) ? -1 : 0;
  endfunction

  initial begin
    for (int k = 0; k < TAPS; k++) begin
      line[k] = 0;
      hist[k] = 0;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (y_valid) begin
        check(exp_q.size() > 0, "output with no sample in flight");
        if (exp_q.size() > 0) begin
          int e, c;
          e = exp_q.pop_front();
          c = acc_q.pop_front();
          check(int'(y_out) == e, $sformatf("cycle %0d: y=%0d expected %0d", cycle, y_out, e));
          check(cycle - c == 6, $sformatf("latency %0d clocks, expected 5", cycle - c - 1));
          out_count++;
        end
      end
      // filter start: coefficients are sampled now
      if (start_pend) begin
        int s;
        s = 0;
        for (int k = 0; k < TAPS; k++) s += line[TAPS-1-k] * hist[k];
        exp_q.push_back(s);
        start_pend = 0;
      end
      // the modulated sample enters the filter
      if (xd_valid) begin
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = xd;
        start_pend = 1;
      end
      xd_valid = 0;
      if (x_valid && !x_ready) n_wait++;
      if (x_valid && x_ready) begin
        xd = tern_q(xs_state + int'(x_in));
        xs_state = xs_state + int'(x_in) - xd * FS;
        if (xd > 0) n_pos++; else if (xd < 0) n_neg++; else n_zero++;
        xd_valid = 1;
        acc_q.push_back(cycle);
        if (last_acc >= 0) begin
          check(cycle - last_acc >= 6, $sformatf("samples %0d clocks apart", cycle - last_acc));
          if (cycle - last_acc == 6) n_b2b++;
        end
        last_acc = cycle;
        acc_count++;
      end
      // weight path: a ternary weight registered last clock shifts in now
      if (wd_valid) begin
        for (int k = TAPS - 1; k > 0; k--) line[k] = line[k-1];
        line[0] = wd;
        if (exp_q.size() > 0 || start_pend || xd_valid) n_reload_live++;
      end
      wd_valid = 0;
      if (w_clear) ws_state = 0;
      else if (w_valid) begin
        wd = tern_q(ws_state + int'(w_in));
        ws_state = ws_state + int'(w_in) - wd * FS;
        wd_valid = 1;
      end
    end
  end

  // ---- stimulus --------------------------------------------------------
  task automatic load_weights();
    w_clear = 1'b1;
    @(posedge clk); #1;
    w_clear = 1'b0;
    for (int k = 0; k < TAPS; k++) begin
      w_valid = 1'b1;
      w_in = IN_W'($urandom);
      @(posedge clk); #1;
      w_valid = 1'b0;
      repeat ($urandom_range(1)) begin @(posedge clk); #1; end
    end
    n_loads++;
  endtask

  task automatic stream(input int n);
    for (int i = 0; i < n; i++) begin
      int n0;
      repeat (($urandom_range(3) == 0) ? $urandom_range(1, 3) : 0) begin @(posedge clk); #1; end
      x_valid = 1'b1;
      x_in = IN_W'($urandom);
      n0 = acc_count;
      do begin @(posedge clk); #1; end while (acc_count == n0);
      x_valid = 1'b0;
    end
  endtask

  initial begin
    x_valid = 1'b0; x_in = '0; w_clear = 1'b0; w_valid = 1'b0; w_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    load_weights();
    stream(NS / 2);
    fork
      stream(NS / 2);
      begin
        repeat (20) @(posedge clk);
        #1;
        load_weights();
      end
    join
    wait (exp_q.size() == 0 && !start_pend && !xd_valid);
    repeat (3) @(posedge clk);
    check(out_count == NS, $sformatf("%0d outputs for %0d samples", out_count, NS));
    check(n_loads == 2, "weight loads");
    check(n_reload_live > 0, "no weight reload while filtering");
    check(n_wait > 0, "no sample held back by x_ready");
    check(n_b2b > 0, "no back-to-back samples at the full rate");
    check(n_pos > 0 && n_zero > 0 && n_neg > 0, "not all ternary digits seen");
    $display("mechanisms: loads=%0d live_reload_shifts=%0d held=%0d back_to_back=%0d digits +1/0/-1=%0d/%0d/%0d",
             n_loads, n_reload_live, n_wait, n_b2b, n_pos, n_zero, n_neg);
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
