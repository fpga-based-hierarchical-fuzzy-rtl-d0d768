// hfs_sequencer: frame controller of the hierarchical fuzzy system.
//
// A step counter runs 0, 1, ..., FRAME_LEN-1 and wraps, so a new input set
// is processed every FRAME_LEN cycles. Each stage of the datapath is enabled
// for one cycle at a fixed step of the frame:
//   STEP_FUZZ   - the four fuzzifiers sample the inputs
//   STEP_LAYER1 - the rule bases of FLU1 and FLU2 evaluate
//   STEP_LAYER2 - the rule base of FLU3 evaluates
//   STEP_DEFUZZ - the defuzzifier starts; it finishes on its own at the last
//                 step of the frame
// The frame of 17 cycles per operation follows the original FPGA design. The
// position of each stage within the frame is this design's own.
//
// Interface and timing: the enables are decoded combinationally from the
// registered step counter. rst forces step 0, so the first inputs are
// sampled at the first clock edge after reset is released.
module hfs_sequencer
  import hfs_pkg::*;
#(
  parameter int LEN = FRAME_LEN
) (
  input  logic                   clk,
  input  logic                   rst,
  output logic [$clog2(LEN)-1:0] step,
  output logic                   fuzz_en,
  output logic                   layer1_en,
  output logic                   layer2_en,
  output logic                   defuzz_start
);

  localparam int SW = $clog2(LEN);

  always_ff @(posedge clk) begin
    if (rst)                        step <= '0;
    else if (step == SW'(LEN - 1))  step <= '0;
    else                            step <= step + 1'b1;
  end

  assign fuzz_en      = (step == SW'(STEP_FUZZ));
  assign layer1_en    = (step == SW'(STEP_LAYER1));
  assign layer2_en    = (step == SW'(STEP_LAYER2));
  assign defuzz_start = (step == SW'(STEP_DEFUZZ));

endmodule
