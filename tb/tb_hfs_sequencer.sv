// tb_hfs_sequencer: self-checking test of the frame controller.
//
// Runs 20 frames after reset. It checks that the step counter counts
// 0..16 and wraps, that each enable is high exactly once per frame and only
// at its own step, and that a reset in mid-frame restarts the frame at
// step 0.
module tb_hfs_sequencer;
  import hfs_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [4:0] step;
  logic fuzz_en, layer1_en, layer2_en, defuzz_start;
  int checks = 0, failures = 0;

  hfs_sequencer dut (.clk, .rst, .step, .fuzz_en, .layer1_en, .layer2_en,
                     .defuzz_start);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n_f, n_1, n_2, n_d;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(step == 0, "reset to step 0");
    rst = 1'b0;
    for (int f = 0; f < 20; f++) begin
      n_f = 0; n_1 = 0; n_2 = 0; n_d = 0;
      for (int s = 0; s < 17; s++) begin
        check(int'(step) == s, $sformatf("frame %0d: step %0d exp %0d", f, step, s));
        check(fuzz_en == (s == 0) && layer1_en == (s == 1) &&
              layer2_en == (s == 2) && defuzz_start == (s == 3),
              $sformatf("enables at step %0d", s));
        n_f += fuzz_en; n_1 += layer1_en; n_2 += layer2_en; n_d += defuzz_start;
        @(posedge clk);
        #1;
      end
      check(n_f == 1 && n_1 == 1 && n_2 == 1 && n_d == 1, "one enable each per frame");
    end
    // mid-frame reset
    repeat (7) @(posedge clk);
    rst = 1'b1;
    @(posedge clk);
    #1;
    rst = 1'b0;
    check(step == 0 && fuzz_en, "mid-frame reset restarts at step 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
