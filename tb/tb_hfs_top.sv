// tb_hfs_top: end-to-end test of the four-input hierarchical fuzzy system,
// at its default parameters.
//
// The system is free-running with a 17-cycle frame. After each y_valid
// pulse the testbench presents the next four inputs, which the system
// samples at the following edge. Every result is compared with the flat
// single-layer reference: 625 four-input min-max rules followed by the
// weighted average. So the test also checks that the two-layer system
// behaves exactly like the single-layer one. It also checks:
//   - the known vector x = (40,B0,A0,70) gives +0E, with the layer-2 sums
//     14D / 18E7 / 2BD4 / 12ED,
//   - 17 cycles per operation, from reset and between results,
//   - outputs hold between results.
// The mechanisms of the design are counted, and one that never occurs
// counts as a failure: each input region (the two shoulders and the four
// overlap segments), a grade clipped at FF, every output term of FLU1, FLU2
// and FLU3, and negative, positive and zero results.
module tb_hfs_top;
  import hfs_pkg::*;
  import hfs_ref_pkg::*;

  localparam int N_RANDOM = 4000;

  logic clk = 1'b0;
  logic rst;
  logic [7:0] x1, x2, x3, x4;
  logic y_sign, y_valid;
  logic [19:0] y_mag;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_region [6];       // left shoulder, 4 segments, right shoulder
  int n_clip = 0;         // a grade clipped at FF inside a segment
  int n_term1 [5], n_term2 [5], n_term3 [5];
  int n_neg = 0, n_pos = 0, n_zero = 0;

  hfs_top dut (.clk, .rst, .x1, .x2, .x3, .x4, .y_sign, .y_mag, .y_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (17 * (N_RANDOM + 200)) @(posedge clk);
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

  function automatic int region(int xv);
    if (xv < 'h2A) return 0;
    if (xv < 'h55) return 1;
    if (xv < 'h7F) return 2;
    if (xv < 'hAA) return 3;
    if (xv < 'hDA) return 4;
    return 5;
  endfunction

  // count what one input vector exercises, from the reference model
  task automatic count_mechanisms(int a, int b, int c, int d);
    grades_t u1, u2, yv;
    int xs [4];
    xs = '{a, b, c, d};
    foreach (xs[i]) begin
      n_region[region(xs[i])]++;
      if (xs[i] == 'h2A || xs[i] == 'h7F) n_clip++;
    end
    u1 = infer2(fuzzify(a), fuzzify(b));
    u2 = infer2(fuzzify(c), fuzzify(d));
    yv = infer2(u1, u2);
    for (int k = 0; k < 5; k++) begin
      if (u1[k] != 0) n_term1[k]++;
      if (u2[k] != 0) n_term2[k]++;
      if (yv[k] != 0) n_term3[k]++;
    end
  endtask

  // Present one vector right after a valid pulse, wait for its result.
  task automatic run(int a, int b, int c, int d);
    bit eneg;
    int emag, cyc;
    logic [19:0] held_mag;
    logic held_sign;
    x1 <= 8'(a); x2 <= 8'(b); x3 <= 8'(c); x4 <= 8'(d);
    held_mag = y_mag; held_sign = y_sign;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
      #1;
      if (!y_valid && cyc > 1)
        check(y_mag == held_mag && y_sign == held_sign, "output holds between results");
    end while (!y_valid && cyc < 40);
    check(cyc == 17, $sformatf("operation took %0d cycles, expected 17", cyc));
    emag = defuzz(infer_flat(a, b, c, d), eneg);
    check(int'(y_mag) == emag && y_sign == eneg,
          $sformatf("x=(%02h,%02h,%02h,%02h) got %s%0d exp %s%0d", a, b, c, d,
                    y_sign ? "-" : "+", y_mag, eneg ? "-" : "+", emag));
    if (emag == 0) n_zero++;
    else if (eneg) n_neg++;
    else n_pos++;
    count_mechanisms(a, b, c, d);
  endtask

  initial begin
    int cyc;
    foreach (n_region[i]) n_region[i] = 0;
    foreach (n_term1[i]) begin n_term1[i] = 0; n_term2[i] = 0; n_term3[i] = 0; end

    rst = 1'b1;
    x1 = 8'h40; x2 = 8'hB0; x3 = 8'hA0; x4 = 8'h70;
    repeat (3) @(posedge clk);
    #1;
    check(y_mag == '0 && !y_sign && !y_valid, "reset state");
    rst = 1'b0;

    // first operation from reset: the known vector
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
      #1;
    end while (!y_valid && cyc < 40);
    check(cyc == 17, $sformatf("first operation took %0d cycles, expected 17", cyc));
    check(y_mag == 20'h0000E && !y_sign, $sformatf("known vector got %0d", y_mag));
    check(dut.u_defuzz.sum_mu == 12'h14D && dut.u_defuzz.sum_neg == 20'h018E7 &&
          dut.u_defuzz.sum_pos == 20'h02BD4 && dut.u_defuzz.diff == 20'h012ED,
          "known vector layer-2 sums");
    count_mechanisms('h40, 'hB0, 'hA0, 'h70);
    n_pos++;

    // the second vector of the same test, then directed corners
    run('h70, 'h40, 'hA0, 'h50);
    run('h40, 'hB0, 'hA0, 'h70);
    run('h00, 'h00, 'h00, 'h00);
    run('hFF, 'hFF, 'hFF, 'hFF);
    run('h7F, 'h7F, 'h7F, 'h7F);
    run('h2A, 'h55, 'hAA, 'hDA);
    run('h00, 'hFF, 'h00, 'hFF);
    for (int v = 0; v < 256; v += 5) run(v, 255 - v, v, 255 - v);
    for (int v = 0; v < 256; v += 3) run(v, v, 'h7F, 'h7F);

    for (int n = 0; n < N_RANDOM; n++)
      run($urandom_range(0, 255), $urandom_range(0, 255),
          $urandom_range(0, 255), $urandom_range(0, 255));

    // every mechanism must have happened
    foreach (n_region[i]) check(n_region[i] > 0, $sformatf("input region %0d never hit", i));
    check(n_clip > 0, "grade clipping never happened");
    for (int k = 0; k < 5; k++) begin
      check(n_term1[k] > 0, $sformatf("FLU1 term A%0d never active", k + 1));
      check(n_term2[k] > 0, $sformatf("FLU2 term B%0d never active", k + 1));
      check(n_term3[k] > 0, $sformatf("FLU3 output term %0d never active", k));
    end
    check(n_neg > 0 && n_pos > 0 && n_zero > 0, "sign cases");
    $display("mechanisms: regions %p clip %0d neg %0d pos %0d zero %0d",
             n_region, n_clip, n_neg, n_pos, n_zero);
    $display("terms FLU1 %p FLU2 %p FLU3 %p", n_term1, n_term2, n_term3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
