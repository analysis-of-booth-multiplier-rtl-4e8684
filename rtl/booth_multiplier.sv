// booth_multiplier: sequential radix-2 Booth multiplier for signed
// two's complement operands.
//
// The datapath is the classic register set of the Booth algorithm: A (the
// left half of the product), Q (the multiplier, which becomes the right half),
// the extra bit Q-1, M (the multiplicand) and a step counter. A start pulse
// clears A and Q-1, loads M, Q and Count = N. Each following clock looks at
// {Q0, Q-1}: 10 subtracts M from A, 01 adds M to A, 00 and 11 leave A alone;
// then A, Q and Q-1 are shifted right arithmetically as one word and Count is
// decremented. After N steps the product {A, Q} is complete.
//
// Interface and timing: start is sampled while busy is low. busy is high for
// exactly N cycles; done pulses for one cycle right after the last step, and
// product holds {A, Q} until the next start. A start while busy is ignored.
//
// Follows the algorithm as described: the register set, the action table and
// the N-step count. This design's own choices: A carries one guard bit above
// the N product bits, so that subtracting the most negative multiplicand
// cannot overflow; an asynchronous active-low reset.
module booth_multiplier
  import fir_pkg::*;
#(
  parameter int unsigned N = SWL_W   // operand width in bits
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [N-1:0]   multiplicand,
  input  logic signed [N-1:0]   multiplier,
  output logic                  busy,
  output logic                  done,
  output logic signed [2*N-1:0] product
);

  localparam int unsigned CW = $clog2(N + 1);

  logic signed [N:0] a_q;     // A with one guard bit
  logic [N-1:0]      q_q;     // Q
  logic              q_m1_q;  // Q-1
  logic signed [N:0] m_q;     // M, sign-extended
  logic [CW-1:0]     count_q;

  booth_op_e         op;
  logic signed [N:0] a_next;

  always_comb begin
    op = booth_op_e'({q_q[0], q_m1_q});
    unique case (op)
      BOOTH_SUB: a_next = a_q - m_q;
      BOOTH_ADD: a_next = a_q + m_q;
      default:   a_next = a_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= '0;
      q_q     <= '0;
      q_m1_q  <= 1'b0;
      m_q     <= '0;
      count_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        // arithmetic shift right of {A, Q, Q-1}
        {a_q, q_q, q_m1_q} <= {a_next[N], a_next, q_q};
        count_q <= count_q - 1'b1;
        if (count_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        a_q     <= '0;
        q_m1_q  <= 1'b0;
        m_q     <= (N+1)'(multiplicand);
        q_q     <= multiplier;
        count_q <= CW'(N);
        busy    <= 1'b1;
      end
    end
  end

  assign product = {a_q[N-1:0], q_q};

  // After a step the guard bit of A must equal its sign bit: the product fits.
  a_guard : assert property (@(posedge clk) disable iff (!rst_n) done |-> a_q[N] == a_q[N-1]);

endmodule
