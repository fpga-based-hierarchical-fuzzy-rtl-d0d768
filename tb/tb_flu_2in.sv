// tb_flu_2in: self-checking test of a first-layer fuzzy logic unit.
//
// Applies all 65536 input pairs, one pair per three cycles: fuzz_en, then
// rule_en, then the check. Each result is compared with the reference model
// (fuzzify both inputs, then the two-input rule base). Also checks the two
// known mapping-variable vectors: (40,B0) gives A2/A3/A4 = 7E/84/1E, and
// (A0,70) gives B2/B3/B4 = 3C/4B/87. The two-stage latency is checked too:
// u must not change on fuzz_en alone.
module tb_flu_2in;
  import hfs_pkg::*;
  import hfs_ref_pkg::*;

  logic clk = 1'b0;
  logic rst, fuzz_en, rule_en;
  logic [7:0] xa, xb;
  fset_t u;
  int checks = 0, failures = 0;

  flu_2in dut (.clk, .rst, .fuzz_en, .rule_en, .xa, .xb, .u);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic run(int va, int vb);
    grades_t e;
    fset_t u_prev;
    xa <= 8'(va); xb <= 8'(vb); fuzz_en <= 1'b1;
    @(posedge clk);
    fuzz_en <= 1'b0; rule_en <= 1'b1;
    u_prev = u;
    #1;
    check(u == u_prev, "u unchanged by fuzz_en alone");
    @(posedge clk);
    rule_en <= 1'b0;
    #1;
    e = infer2(fuzzify(va), fuzzify(vb));
    for (int k = 0; k < 5; k++) begin
      check(int'(u.msf[k]) == e[k],
            $sformatf("(%02h,%02h) term %0d got %02h exp %02h", va, vb, k, u.msf[k], e[k]));
      check(u.fn[k] == (e[k] != 0), $sformatf("(%02h,%02h) fn[%0d]", va, vb, k));
    end
  endtask

  initial begin
    rst = 1'b1; fuzz_en = 1'b0; rule_en = 1'b0; xa = '0; xb = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;

    run('h40, 'hB0);
    check(u.msf[1] == 8'h7E && u.msf[2] == 8'h84 && u.msf[3] == 8'h1E &&
          u.msf[0] == 8'h00 && u.msf[4] == 8'h00, "U1 example");
    run('hA0, 'h70);
    check(u.msf[1] == 8'h3C && u.msf[2] == 8'h4B && u.msf[3] == 8'h87 &&
          u.msf[0] == 8'h00 && u.msf[4] == 8'h00, "U2 example");

    for (int va = 0; va < 256; va++)
      for (int vb = 0; vb < 256; vb++)
        run(va, vb);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
