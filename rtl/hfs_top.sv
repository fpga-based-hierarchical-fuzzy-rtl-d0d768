// hfs_top: four-input, two-layer hierarchical fuzzy system (L-HFS).
//
// A single four-input fuzzy system with five terms per input would need
// 5^4 = 625 rules. This design splits it into three two-input fuzzy logic
// units (FLUs) of 25 rules each, 75 in all:
//
//   x1, x2 --> FLU1 --> U1 = {A1..A5} --+
//                                        +--> FLU3 --> defuzzifier --> y
//   x3, x4 --> FLU2 --> U2 = {B1..B5} --+
//
// FLU1 and FLU2 (layer 1) each fuzzify their two inputs and run the rule
// table. Their outputs stay fuzzy: U1 and U2 are five-grade vectors, not
// crisp values. FLU3 (layer 2) is a rule base alone, with the same table,
// applied to U1 and U2. With min-max inference this gives exactly the output
// of the 625-rule single-layer system whose table is the composition
// RULES[RULES[x1][x2]][RULES[x3][x4]]. A weighted-average defuzzifier turns
// the result into a crisp sign and magnitude.
//
// The structure and the rule table follow the original FPGA design, as do the
// port set (clock, reset, four 8-bit inputs, sign and a 20-bit magnitude)
// and the 17-cycle operation. The y_valid strobe is an addition of this
// design.
//
// Interface and timing: the system is free-running. The inputs are sampled
// at the clock edge that ends step 0 of each 17-cycle frame, so they must be
// stable then. The edge that ends step 16 loads the result into
// y_sign/y_mag, which then hold until the next frame's result. y_valid
// pulses in the cycle after that edge. Counting the sampling edge as the
// first, the result edge is the 17th, and y_valid is high during step 0 of
// the next frame, whose sample is taken at the end of that cycle.
// So after y_valid, a testbench or a host has until the next rising edge to
// present new inputs. The output value y_mag/255 (negated when y_sign is
// set) is the crisp result on the -1..+1 scale.
module hfs_top
  import hfs_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [MU_W-1:0]  x1,
  input  logic [MU_W-1:0]  x2,
  input  logic [MU_W-1:0]  x3,
  input  logic [MU_W-1:0]  x4,
  output logic             y_sign,
  output logic [OUT_W-1:0] y_mag,
  output logic             y_valid
);

  logic  fuzz_en, layer1_en, layer2_en, defuzz_start;
  logic [$clog2(FRAME_LEN)-1:0] step;
  fset_t u1, u2, yf;

  logic             df_busy;

  hfs_sequencer u_seq (
    .clk, .rst, .step, .fuzz_en, .layer1_en, .layer2_en, .defuzz_start
  );

  // Layer 1
  flu_2in u_flu1 (
    .clk, .rst, .fuzz_en, .rule_en(layer1_en), .xa(x1), .xb(x2), .u(u1)
  );
  flu_2in u_flu2 (
    .clk, .rst, .fuzz_en, .rule_en(layer1_en), .xa(x3), .xb(x4), .u(u2)
  );

  // Layer 2
  rule_base u_flu3 (
    .clk, .rst, .en(layer2_en), .a(u1), .b(u2), .y(yf)
  );

  defuzzifier u_defuzz (
    .clk, .rst, .start(defuzz_start), .y(yf),
    .busy(df_busy), .valid(y_valid), .y_sign, .y_mag,
    .sum_mu(), .sum_neg(), .sum_pos(), .diff()
  );

  // The defuzzifier must be done by the end of each frame.
  a_defuzz_fits_frame: assert property (
    @(posedge clk) disable iff (rst) (step == '0) |-> !df_busy
  ) else $error("hfs_top: defuzzifier overruns the frame");

endmodule
