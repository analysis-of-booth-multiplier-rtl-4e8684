// booth_rand_checker: drives one booth_multiplier of width N with its corner
// cases (most negative and most positive operands in all pairings, -1 x -1)
// and NT random operand pairs, one multiply at a time. Each product is
// compared with the integer product and each multiply must take exactly N
// clocks from the start edge to done. done rises when all are checked.
module booth_rand_checker #(
  parameter int N  = 8,
  parameter int NT = 300
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  logic                  start, busy, mdone;
  logic signed [N-1:0]   a, b;
  logic signed [2*N-1:0] p;

  booth_multiplier #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .multiplicand(a),
                                 .multiplier(b), .busy(busy), .done(mdone), .product(p));

  localparam int MINV = -(1 <<< (N - 1));
  localparam int MAXV = (1 << (N - 1)) - 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (N=%0d): %s", N, what);
    end
  endtask

  task automatic run(input int m, input int q);
    int cyc = 0;
    a = N'(m); b = N'(q); start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    do begin
      @(posedge clk); #1;
      cyc++;
    end while (!mdone && cyc < 4 * N);
    check(p == (2*N)'(m * q), $sformatf("%0d*%0d gave %0d", m, q, p));
    check(cyc == N, $sformatf("latency %0d, expected %0d", cyc, N));
    check(!busy, "busy after done");
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    start = 1'b0; a = '0; b = '0;
    wait (rst_n);
    @(posedge clk); #1;
    run(MINV, MINV); run(MINV, MAXV); run(MAXV, MINV); run(MAXV, MAXV);
    run(0, MINV); run(-1, -1); run(MINV, 1); run(1, MINV);
    for (int i = 0; i < NT; i++)
      run(int'($signed(N'($urandom))), int'($signed(N'($urandom))));
    done = 1'b1;
  end
endmodule
