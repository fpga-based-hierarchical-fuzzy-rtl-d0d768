// fuzzifier: crisp 8-bit input to a five-term fuzzy vector.
//
// The input range 00..FF (-1..+1) is split by five breakpoints BP[0..4]
// into a left shoulder, four segments and a right shoulder. Below BP[0] the
// input is NB with grade FF. From BP[4] on it is PB with grade FF. Inside
// segment k (BP[k] <= x < BP[k+1]) two neighbouring terms overlap. Term k
// falls as SLOPE[k]*(BP[k+1]-x) and term k+1 rises as SLOPE[k]*(x-BP[k]).
// Both grades saturate at FF and all other grades are zero. So at most two
// terms are active, and fn flags the ones with a non-zero grade.
//
// The default breakpoints are the five-term partition NB/NS/ZE/PS/PB:
// shoulder to 2A, then peaks at 55, 7F and AA, and shoulder from DA. The
// default slopes {6,5,6,5} reproduce the grades published for the original
// FPGA design.
// They are not a normalised partition: in the two segments with slope 5 the
// grades stay below FF: NS at x = 55 is D2, and PB at x = D9 is EB.
//
// Interface and timing: the grades are computed combinationally from x. q
// is loaded when en is high, so there is one cycle of latency and q holds
// between enables. rst clears q synchronously.
module fuzzifier
  import hfs_pkg::*;
#(
  parameter bp_t    BP    = MF_BP,
  parameter slope_t SLOPE = MF_SLOPE
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic [MU_W-1:0] x,
  output fset_t           q
);

  // Saturating scale of a segment distance by an integer slope.
  function automatic mu_t sat_scale(input logic [15:0] slope,
                                    input logic [MU_W-1:0] delta);
    logic [MU_W+15:0] p;
    p = (MU_W+16)'(slope) * (MU_W+16)'(delta);
    return (p > (MU_W+16)'(MU_MAX)) ? MU_MAX : p[MU_W-1:0];
  endfunction

  fset_t d;

  always_comb begin
    d = '0;
    if (x < BP[0]) begin
      d.msf[0] = MU_MAX;
    end else if (x >= BP[N_TERMS-1]) begin
      d.msf[N_TERMS-1] = MU_MAX;
    end else begin
      for (int k = 0; k < N_TERMS-1; k++) begin
        if (x >= BP[k] && x < BP[k+1]) begin
          d.msf[k]   = sat_scale(16'(SLOPE[k]), BP[k+1] - x);
          d.msf[k+1] = sat_scale(16'(SLOPE[k]), x - BP[k]);
        end
      end
    end
    for (int i = 0; i < N_TERMS; i++) d.fn[i] = (d.msf[i] != '0);
  end

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
