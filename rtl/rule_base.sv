// rule_base: 25-rule, two-input Mamdani inference with min-max composition.
//
// The inputs are two fuzzy vectors a and b of five terms each. Rule (i,j)
// reads "if a is term i and b is term j then y is RULES[i][j]". It fires
// only when both antecedent flags a.fn[i] and b.fn[j] are set. Its strength
// is min(a.msf[i], b.msf[j]). Each output term takes the largest strength
// among the rules that conclude it. y.fn marks the output terms with a
// non-zero grade, so y can feed another rule_base directly. That is how the
// second layer of the hierarchical system is built.
//
// All 25 rules are evaluated in parallel, as 25 comparators and a max tree
// per output term. The default table is the system's L-HFS table
// (hfs_pkg::LHFS_RULES). The min/max operators reproduce the published
// intermediate sums. The fn gating follows the description of the
// fuzzification flags.
//
// Interface and timing: y is loaded from the combinational result when en
// is high, so there is one cycle of latency. rst clears y synchronously.
module rule_base
  import hfs_pkg::*;
#(
  parameter rule_table_t RULES = LHFS_RULES
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  fset_t a,
  input  fset_t b,
  output fset_t y
);

  fset_t d;

  always_comb begin
    mu_t s;
    d = '0;
    for (int i = 0; i < N_TERMS; i++) begin
      for (int j = 0; j < N_TERMS; j++) begin
        s = (a.msf[i] < b.msf[j]) ? a.msf[i] : b.msf[j];
        if (a.fn[i] && b.fn[j] && s > d.msf[RULES[i][j]])
          d.msf[RULES[i][j]] = s;
      end
    end
    for (int k = 0; k < N_TERMS; k++) d.fn[k] = (d.msf[k] != '0);
  end

  always_ff @(posedge clk) begin
    if (rst)     y <= '0;
    else if (en) y <= d;
  end

endmodule
