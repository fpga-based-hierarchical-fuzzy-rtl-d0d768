// flu_2in: first-layer fuzzy logic unit with two crisp inputs.
//
// Two fuzzifiers turn xa and xb into five-term fuzzy vectors. A rule_base
// combines them into the unit's mapping-variable vector u. In the
// hierarchical system, FLU1 takes (x1,x2) and yields U1 = {A1..A5}. FLU2
// takes (x3,x4) and yields U2 = {B1..B5}. Both units are built the same way
// and use the same rule table.
//
// Interface and timing: there are two register stages. fuzz_en samples xa
// and xb into the fuzzifiers. rule_en evaluates the rules on the fuzzified
// values and loads u. So u is valid one cycle after a rule_en that follows
// a fuzz_en. rst clears all registers synchronously.
module flu_2in
  import hfs_pkg::*;
#(
  parameter rule_table_t RULES = LHFS_RULES
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            fuzz_en,
  input  logic            rule_en,
  input  logic [MU_W-1:0] xa,
  input  logic [MU_W-1:0] xb,
  output fset_t           u
);

  fset_t fa, fb;

  fuzzifier u_fuzz_a (.clk, .rst, .en(fuzz_en), .x(xa), .q(fa));
  fuzzifier u_fuzz_b (.clk, .rst, .en(fuzz_en), .x(xb), .q(fb));

  rule_base #(.RULES(RULES)) u_rules (
    .clk, .rst, .en(rule_en), .a(fa), .b(fb), .y(u)
  );

endmodule
