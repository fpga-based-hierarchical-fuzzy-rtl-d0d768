// hfs_pkg: types and constants shared by the hierarchical fuzzy system.
//
// Every signal in the system is expressed on the same 8-bit scale. A crisp
// input x in 00..FF stands for the real value 2*x/255 - 1, so 00 is -1 and FF
// is +1. A membership grade 00..FF stands for 0..1. Each variable has five
// linguistic terms, NB, NS, ZE, PS and PB. Between stages a variable travels
// as a fuzzy vector (fset_t): a 5-bit flag vector fn that marks the terms with
// a non-zero grade, plus the five 8-bit grades msf.
//
// LHFS_RULES is the single 5x5 rule table used by all three fuzzy logic
// units. It is the 625-entry four-input relation of the limpid hierarchical
// scheme, reduced to its two-input form. The same table maps (x1,x2) onto
// A1..A5, maps (x3,x4) onto B1..B5 and maps (A,B) onto the output terms. The
// membership breakpoints follow the five-term input partition. The slopes and
// the inner output weights (+-85) are the values that reproduce the published
// example of the original FPGA design. The outer weights (+-170) and the frame schedule are this design's
// own choices.
package hfs_pkg;

  localparam int N_TERMS = 5;   // linguistic terms per variable
  localparam int MU_W    = 8;   // width of a crisp value or a grade
  localparam logic [MU_W-1:0] MU_MAX = '1;

  typedef enum logic [2:0] {
    NB = 3'd0,  // negative big
    NS = 3'd1,  // negative small
    ZE = 3'd2,  // zero
    PS = 3'd3,  // positive small
    PB = 3'd4   // positive big
  } term_e;

  typedef logic [MU_W-1:0] mu_t;

  // Fuzzy vector: fn[i] is set when term i has a non-zero grade msf[i].
  typedef struct packed {
    logic [N_TERMS-1:0]      fn;
    mu_t  [N_TERMS-1:0]      msf;
  } fset_t;

  // Rule table, indexed [term of first input][term of second input].
  typedef term_e rule_table_t [N_TERMS][N_TERMS];

  localparam rule_table_t LHFS_RULES = '{
    '{NB, NB, NB, NS, ZE},
    '{NB, NS, NS, ZE, PS},
    '{NB, NS, ZE, PS, PB},
    '{NS, ZE, PS, PS, PB},
    '{ZE, PS, PB, PB, PB}
  };

  // Input partition: BP[k] is the left end of segment k, BP[k+1] its right
  // end. Below BP[0] only NB is active (grade FF); from BP[4] on, only PB.
  // Inside segment k, term k falls and term k+1 rises with slope SLOPE[k]
  // (grade steps per input step), saturated at FF.
  typedef logic [MU_W-1:0] bp_t [N_TERMS];
  typedef int unsigned     slope_t [N_TERMS-1];

  localparam bp_t    MF_BP    = '{8'h2A, 8'h55, 8'h7F, 8'hAA, 8'hDA};
  localparam slope_t MF_SLOPE = '{6, 5, 6, 5};

  // Output singletons on the scale 255 = 1.0: NB -2/3, NS -1/3, ZE 0,
  // PS +1/3, PB +2/3.
  typedef int weight_t [N_TERMS];
  localparam weight_t OUT_WEIGHT = '{-170, -85, 0, 85, 170};

  // Widths of the defuzzifier's sums, as in the original FPGA design.
  localparam int SUM_W = 12;  // sum of grades (suh)
  localparam int ACC_W = 20;  // weighted sums (finish1, finish2, pr)
  localparam int OUT_W = 20;  // crisp output magnitude

  // Frame schedule, in clock cycles counted from 0. The inputs are sampled
  // at the end of step STEP_FUZZ and the result is registered at the end
  // of step FRAME_LEN-1.
  localparam int STEP_FUZZ   = 0;
  localparam int STEP_LAYER1 = 1;
  localparam int STEP_LAYER2 = 2;
  localparam int STEP_DEFUZZ = 3;
  localparam int FRAME_LEN   = 17;

endpackage
