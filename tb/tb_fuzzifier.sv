// tb_fuzzifier: self-checking test of the fuzzifier.
//
// Sweeps all 256 input codes and compares the registered grades and flags
// with a reference written per membership function: each term is a
// triangle or shoulder with its own feet, peak and two slopes. The grades
// of four known operating points are also checked against fixed values:
// x = 40, B0, A0, 70 give NB/NS = 7E/84, PS/PB = D2/1E, ZE/PS = 3C/C6 and
// NS/ZE = 4B/87. Further checks: one cycle of latency, hold while en is
// low, and clear on reset.
module tb_fuzzifier;
  import hfs_pkg::*;

  logic clk = 1'b0;
  logic rst, en;
  logic [7:0] x;
  fset_t q;
  int checks = 0, failures = 0;

  fuzzifier dut (.clk, .rst, .en, .x, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: rising edge from lf (slope sl) to the peak pk, falling edge
  // from pk to rf (slope sr). Shoulders use lf = -1 or rf = 256.
  function automatic int tri_mu(int xv, int lf, int pk, int rf, int sl, int sr);
    int v;
    if (xv < lf || xv >= rf) return 0;
    if (xv < pk) v = sl * (xv - lf);
    else         v = sr * (rf - xv);
    if (lf < 0 && xv < pk) v = 255;
    if (rf > 255 && xv >= pk) v = 255;
    return (v > 255) ? 255 : v;
  endfunction

  function automatic int ref_mu(int xv, int t);
    case (t)
      0: return tri_mu(xv, -1,   'h2A, 'h55, 0, 6);
      1: return tri_mu(xv, 'h2A, 'h55, 'h7F, 6, 5);
      2: return tri_mu(xv, 'h55, 'h7F, 'hAA, 5, 6);
      3: return tri_mu(xv, 'h7F, 'hAA, 'hDA, 6, 5);
      default: return tri_mu(xv, 'hAA, 'hDA, 256, 5, 0);
    endcase
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(int xv);
    x  <= 8'(xv);
    en <= 1'b1;
    @(posedge clk);
    en <= 1'b0;
    #1;
  endtask

  // expected grades, one per term, for a known operating point
  task automatic check_point(int xv, int e0, int e1, int e2, int e3, int e4);
    int e [5];
    e = '{e0, e1, e2, e3, e4};
    apply(xv);
    for (int t = 0; t < 5; t++)
      check(int'(q.msf[t]) == e[t],
            $sformatf("x=%02h term %0d got %02h exp %02h", xv, t, q.msf[t], e[t]));
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    #1;
    check(q == '0, "reset clears q");
    rst = 1'b0;

    // full sweep against the per-term reference
    for (int xv = 0; xv < 256; xv++) begin
      int active;
      apply(xv);
      active = 0;
      for (int t = 0; t < 5; t++) begin
        check(int'(q.msf[t]) == ref_mu(xv, t),
              $sformatf("x=%02h term %0d got %02h exp %02h", xv, t, q.msf[t], ref_mu(xv, t)));
        check(q.fn[t] == (ref_mu(xv, t) != 0), $sformatf("x=%02h fn[%0d]", xv, t));
        if (q.msf[t] != 0) active++;
      end
      check(active >= 1 && active <= 2, $sformatf("x=%02h active terms %0d", xv, active));
    end

    // known operating points (NB, NS, ZE, PS, PB)
    check_point('h40, 'h7E, 'h84, 0, 0, 0);
    check_point('hB0, 0, 0, 0, 'hD2, 'h1E);
    check_point('hA0, 0, 0, 'h3C, 'hC6, 0);
    check_point('h70, 0, 'h4B, 'h87, 0, 0);
    check_point('h00, 'hFF, 0, 0, 0, 0);
    check_point('hFF, 0, 0, 0, 0, 'hFF);

    // q holds while en is low, and updates exactly one edge after en
    apply('h40);
    x <= 8'hB0;
    repeat (3) @(posedge clk);
    #1;
    check(q.msf[0] == 8'h7E && q.msf[3] == 8'h00, "q holds while en low");
    en <= 1'b1;
    @(posedge clk);
    en <= 1'b0;
    #1;
    check(q.msf[3] == 8'hD2, "q updates one edge after en");

    rst <= 1'b1;
    @(posedge clk);
    #1;
    check(q == '0, "reset clears q after use");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
