// defuzzifier: weighted-average (height) defuzzification with sign/magnitude
// output.
//
// The output terms are singletons at W[0..4] on the scale 255 = 1.0. The
// crisp output is sum(W[k]*mu[k]) / sum(mu[k]). It is computed in sign and
// magnitude, in four phases:
//   1. ACC  (5 cycles, one term per cycle) - sum_mu accumulates the grades
//           (suh), sum_neg the products with negative weights (finish1),
//           and sum_pos those with positive weights (finish2).
//   2. DIFF (1 cycle) - diff = |sum_pos - sum_neg| (pr); sign = sum_neg >
//           sum_pos.
//   3. DIV  (QB cycles) - restoring division diff / sum_mu, one quotient bit
//           per cycle, MSB first. Because |W| <= WMAX, the quotient is below
//           2^QB, with QB = clog2(WMAX+1) = 8 for the default weights.
//   4. The quotient is zero-extended to OUT_W bits and loaded into y_mag,
//      together with y_sign, and valid pulses for one cycle.
// The magnitude is truncated toward zero. If no term has a non-zero grade
// (sum_mu = 0), the division yields all ones, so the result would be
// meaningless. The fuzzifier's partition always leaves a grade, so this case
// does not arise in the system.
//
// The method and the names of the intermediate sums follow the original
// design. The serial accumulation, the restoring divider and the outer
// weights (+-170) are this design's own choices. The inner weights (+-85)
// reproduce the published example of the original FPGA design.
//
// Interface and timing: a start pulse while idle captures the grades of
// y (a grade counts only when its fn flag is set) and
// accumulates term 0 in the same edge. valid pulses 4 + 1 + QB = 13 cycles
// after the start edge, i.e. 14 edges in all counting the start edge. busy
// is high from the cycle after start until valid. start while busy is a
// protocol error and is checked by an assertion. rst is synchronous.
module defuzzifier
  import hfs_pkg::*;
#(
  parameter weight_t W = OUT_WEIGHT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  fset_t            y,
  output logic             busy,
  output logic             valid,
  output logic             y_sign,
  output logic [OUT_W-1:0] y_mag,
  // intermediate sums, for observation
  output logic [SUM_W-1:0] sum_mu,
  output logic [ACC_W-1:0] sum_neg,
  output logic [ACC_W-1:0] sum_pos,
  output logic [ACC_W-1:0] diff
);

  function automatic int max_abs_weight(weight_t w);
    int m = 0;
    for (int k = 0; k < N_TERMS; k++) begin
      if (w[k] > m)  m = w[k];
      if (-w[k] > m) m = -w[k];
    end
    return m;
  endfunction

  localparam int WMAX = max_abs_weight(W);
  localparam int QB   = (WMAX < 3) ? 2 : $clog2(WMAX + 1);
  localparam int DW   = ACC_W + QB;   // width of the shifted divisor

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_DIFF, S_DIV} state_e;

  state_e                 state;
  mu_t [N_TERMS-1:0]      mu_q;
  logic [2:0]             k;
  logic [$clog2(QB)-1:0]  qbit;
  logic [ACC_W-1:0]       rem;
  logic [QB-1:0]          quo;
  logic                   neg;

  // Contribution of one term: its grade goes into sum_mu, and |W|*grade
  // goes into the negative or positive sum.
  function automatic logic [ACC_W-1:0] wprod(int w, mu_t m);
    int unsigned a;
    a = (w < 0) ? -w : w;
    return ACC_W'(a * m);
  endfunction

  // A term takes part only when its flag is set, as in the rule bases.
  mu_t [N_TERMS-1:0] mu_in;
  always_comb
    for (int i = 0; i < N_TERMS; i++) mu_in[i] = y.fn[i] ? y.msf[i] : '0;

  logic [DW-1:0] shifted;
  assign shifted = DW'(sum_mu) << qbit;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      mu_q    <= '0;
      k       <= '0;
      qbit    <= '0;
      rem     <= '0;
      quo     <= '0;
      neg     <= 1'b0;
      sum_mu  <= '0;
      sum_neg <= '0;
      sum_pos <= '0;
      diff    <= '0;
      valid   <= 1'b0;
      y_sign  <= 1'b0;
      y_mag   <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          mu_q    <= mu_in;
          sum_mu  <= SUM_W'(mu_in[0]);
          sum_neg <= (W[0] < 0) ? wprod(W[0], mu_in[0]) : '0;
          sum_pos <= (W[0] > 0) ? wprod(W[0], mu_in[0]) : '0;
          k       <= 3'd1;
          state   <= S_ACC;
        end
        S_ACC: begin
          sum_mu <= sum_mu + SUM_W'(mu_q[k]);
          if (W[k] < 0) sum_neg <= sum_neg + wprod(W[k], mu_q[k]);
          if (W[k] > 0) sum_pos <= sum_pos + wprod(W[k], mu_q[k]);
          if (k == 3'(N_TERMS-1)) state <= S_DIFF;
          k <= k + 3'd1;
        end
        S_DIFF: begin
          neg   <= sum_neg > sum_pos;
          diff  <= (sum_neg > sum_pos) ? sum_neg - sum_pos : sum_pos - sum_neg;
          rem   <= (sum_neg > sum_pos) ? sum_neg - sum_pos : sum_pos - sum_neg;
          quo   <= '0;
          qbit  <= ($bits(qbit))'(QB-1);
          state <= S_DIV;
        end
        S_DIV: begin
          logic [QB-1:0] q_next;
          q_next = quo;
          if (DW'(rem) >= shifted) begin
            rem          <= rem - ACC_W'(shifted);
            q_next[qbit] = 1'b1;
          end
          quo <= q_next;
          if (qbit == '0) begin
            y_mag  <= OUT_W'(q_next);
            y_sign <= neg;
            valid  <= 1'b1;
            state  <= S_IDLE;
          end else begin
            qbit <= qbit - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Handshake rule: a new operation may only start when the unit is idle.
  a_start_when_idle: assert property (
    @(posedge clk) disable iff (rst) start |-> state == S_IDLE
  ) else $error("defuzzifier: start while busy");

endmodule
