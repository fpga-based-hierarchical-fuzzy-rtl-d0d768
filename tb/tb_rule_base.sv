// tb_rule_base: self-checking test of the 25-rule min-max rule base.
//
// Drives random fuzzy vectors (sparse, dense and the two-adjacent-term
// shape a fuzzifier produces) and compares y with a reference that walks
// the 25 rules of its own copy of the rule table. Also checks the fn gating
// (a grade whose flag is clear takes no part), one cycle of latency, hold
// while en is low, and reset.
module tb_rule_base;
  import hfs_pkg::*;

  logic clk = 1'b0;
  logic rst, en;
  fset_t a, b, y;
  int checks = 0, failures = 0;

  rule_base dut (.clk, .rst, .en, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consequent term index per (first, second) antecedent: 0 = NB .. 4 = PB
  int tbl [5][5] = '{
    '{0, 0, 0, 1, 2},
    '{0, 1, 1, 2, 3},
    '{0, 1, 2, 3, 4},
    '{1, 2, 3, 3, 4},
    '{2, 3, 4, 4, 4}
  };

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic fset_t rand_vec(int mode);
    fset_t v = '0;
    int t;
    case (mode)
      0: begin  // two adjacent terms, as from a fuzzifier
        t = $urandom_range(0, 3);
        v.msf[t]   = 8'($urandom);
        v.msf[t+1] = 8'($urandom);
      end
      1: for (int i = 0; i < 5; i++) v.msf[i] = 8'($urandom);  // dense
      default: begin  // single term
        t = $urandom_range(0, 4);
        v.msf[t] = 8'($urandom_range(1, 255));
      end
    endcase
    for (int i = 0; i < 5; i++) v.fn[i] = (v.msf[i] != 0);
    return v;
  endfunction

  function automatic fset_t ref_out(fset_t ai, fset_t bi);
    fset_t r = '0;
    int s;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        if (!ai.fn[i] || !bi.fn[j]) continue;
        s = (int'(ai.msf[i]) < int'(bi.msf[j])) ? int'(ai.msf[i]) : int'(bi.msf[j]);
        if (s > int'(r.msf[tbl[i][j]])) r.msf[tbl[i][j]] = 8'(s);
      end
    for (int k = 0; k < 5; k++) r.fn[k] = (r.msf[k] != 0);
    return r;
  endfunction

  task automatic run(fset_t ai, fset_t bi);
    fset_t e;
    a <= ai; b <= bi; en <= 1'b1;
    @(posedge clk);
    en <= 1'b0;
    #1;
    e = ref_out(ai, bi);
    check(y == e, $sformatf("a=%h b=%h got %h exp %h", ai, bi, y, e));
  endtask

  initial begin
    fset_t ta, tb_v, held;
    rst = 1'b1; en = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    #1;
    check(y == '0, "reset clears y");
    rst = 1'b0;

    // every single rule on its own, full grade
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        ta = '0; tb_v = '0;
        ta.msf[i] = 8'hFF; ta.fn[i] = 1'b1;
        tb_v.msf[j] = 8'h80; tb_v.fn[j] = 1'b1;
        run(ta, tb_v);
        check(y.msf[tbl[i][j]] == 8'h80 && y.fn == 5'(1 << tbl[i][j]),
              $sformatf("rule (%0d,%0d) -> %0d", i, j, tbl[i][j]));
      end

    // random vectors
    for (int n = 0; n < 3000; n++)
      run(rand_vec($urandom_range(0, 2)), rand_vec($urandom_range(0, 2)));

    // a grade whose flag is clear does not fire its rules
    ta = '0; tb_v = '0;
    ta.msf[0] = 8'hFF;                        // flag left clear
    ta.msf[4] = 8'h40; ta.fn[4] = 1'b1;
    tb_v.msf[0] = 8'hFF; tb_v.fn[0] = 1'b1;
    run(ta, tb_v);
    check(y.msf[0] == 8'h00 && y.msf[2] == 8'h40, "fn gating");

    // the mapping-variable example: U1 = {A2 7E, A3 84, A4 1E},
    // U2 = {B2 3C, B3 4B, B4 87} gives NS 4B, ZE 7E, PS 84
    ta = '0; tb_v = '0;
    ta.msf[1] = 8'h7E; ta.msf[2] = 8'h84; ta.msf[3] = 8'h1E; ta.fn = 5'b01110;
    tb_v.msf[1] = 8'h3C; tb_v.msf[2] = 8'h4B; tb_v.msf[3] = 8'h87; tb_v.fn = 5'b01110;
    run(ta, tb_v);
    check(y.msf[0] == 8'h00 && y.msf[1] == 8'h4B && y.msf[2] == 8'h7E &&
          y.msf[3] == 8'h84 && y.msf[4] == 8'h00, "layer-2 example");

    // hold while en low
    held = y;
    a <= rand_vec(1); b <= rand_vec(1);
    repeat (3) @(posedge clk);
    #1;
    check(y == held, "y holds while en low");

    rst <= 1'b1;
    @(posedge clk);
    #1;
    check(y == '0, "reset clears y after use");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
