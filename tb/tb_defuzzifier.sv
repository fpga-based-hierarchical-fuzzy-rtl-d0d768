// tb_defuzzifier: self-checking test of the weighted-average defuzzifier.
//
// Starts the unit on random grade vectors and on edge cases: a single term,
// all terms at FF, and symmetric pairs that cancel to zero. It compares
// sign and magnitude with the reference weighted average and checks the
// latency: valid must rise exactly 14 edges after the start edge, counting
// the start edge. Also checks the intermediate sums of the known example
// NS = 4B, ZE = 7E, PS = 84. Those are sum of grades 14D, negative sum 18E7,
// positive sum 2BD4, difference 12ED, and the result +0E.
module tb_defuzzifier;
  import hfs_pkg::*;
  import hfs_ref_pkg::*;

  logic clk = 1'b0;
  logic rst, start, busy, valid, y_sign;
  fset_t y;
  logic [19:0] y_mag;
  logic [11:0] sum_mu;
  logic [19:0] sum_neg, sum_pos, diff;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0;

  defuzzifier dut (.clk, .rst, .start, .y, .busy, .valid, .y_sign, .y_mag,
                   .sum_mu, .sum_neg, .sum_pos, .diff);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(grades_t g);
    bit eneg;
    int emag, edges;
    fset_t v = '0;
    for (int k = 0; k < 5; k++) begin
      v.msf[k] = 8'(g[k]);
      v.fn[k]  = (g[k] != 0);
    end
    emag = defuzz(g, eneg);
    y <= v; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    y <= '0;            // the unit must have captured the grades
    edges = 1;
    #1;
    check(busy, "busy after start");
    while (!valid && edges < 40) begin
      @(posedge clk);
      edges++;
      #1;
    end
    check(edges == 14, $sformatf("latency %0d edges, expected 14", edges));
    check(int'(y_mag) == emag && y_sign == eneg,
          $sformatf("g=%p got %s%0d exp %s%0d", g, y_sign ? "-" : "+", y_mag,
                    eneg ? "-" : "+", emag));
    check(!busy, "idle at valid");
    if (y_sign) n_neg++; else n_pos++;
    @(posedge clk);
    #1;
    check(!valid, "valid is a single pulse");
  endtask

  initial begin
    grades_t g;
    rst = 1'b1; start = 1'b0; y = '0;
    repeat (2) @(posedge clk);
    #1;
    check(!valid && !busy && y_mag == '0, "reset state");
    rst = 1'b0;

    // known example
    run('{0, 'h4B, 'h7E, 'h84, 0});
    check(sum_mu == 12'h14D, $sformatf("sum_mu %h", sum_mu));
    check(sum_neg == 20'h018E7, $sformatf("sum_neg %h", sum_neg));
    check(sum_pos == 20'h02BD4, $sformatf("sum_pos %h", sum_pos));
    check(diff == 20'h012ED, $sformatf("diff %h", diff));
    check(y_mag == 20'h0000E && !y_sign, "example result +0E");

    // single terms give the singleton itself
    for (int k = 0; k < 5; k++) begin
      g = '{0, 0, 0, 0, 0};
      g[k] = 'h91;
      run(g);
    end
    run('{255, 255, 255, 255, 255});
    run('{0, 200, 0, 200, 0});
    run('{255, 0, 0, 0, 1});
    run('{1, 0, 0, 0, 255});

    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 5; k++)
        g[k] = ($urandom_range(0, 2) == 0) ? 0 : int'($urandom_range(0, 255));
      if (g[0] + g[1] + g[2] + g[3] + g[4] == 0) g[2] = 1;
      run(g);
    end
    check(n_neg > 100 && n_pos > 100, "both signs exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
