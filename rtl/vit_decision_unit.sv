// vit_decision_unit: picks the survivor at the end of a trace-forward and
// gives the decoded bit and the next initial state.
//
// A binary tree of comparators finds the state with the smallest path
// metric (on equal metrics the lower state number wins, this design's
// choice). The decision-memory bit of that state is the decoded bit, the
// input bit of the survivor's first transition. The survivor's state after
// that first transition, the initial state of the next decoding process,
// follows from the current initial state and the decoded bit:
// {init_state[K-3:0], bit}.
//
// Interface: purely combinational, log2(states) comparator levels.
module vit_decision_unit
  import vit_pkg::*;
#(
  parameter int SWB = vit_pkg::SW,
  parameter int PMB = vit_pkg::PMW
) (
  input  logic [(1<<SWB)-1:0][PMB-1:0] pm,
  input  logic [(1<<SWB)-1:0]          dec,
  input  logic [SWB-1:0]               init_state,
  output logic [SWB-1:0]               best_state,
  output logic                         dec_bit,
  output logic [SWB-1:0]               next_state
);

  localparam int NST = 1 << SWB;

  // Tree level l has NST >> l nodes; node arrays are sized for level 0.
  logic [NST-1:0][PMB-1:0] lvl_pm  [SWB+1];
  logic [NST-1:0][SWB-1:0] lvl_idx [SWB+1];

  for (genvar s = 0; s < NST; s++) begin : g_leaf
    assign lvl_pm[0][s]  = pm[s];
    assign lvl_idx[0][s] = SWB'(s);
  end

  for (genvar l = 1; l <= SWB; l++) begin : g_level
    for (genvar n = 0; n < (NST >> l); n++) begin : g_node
      logic take_hi;
      assign take_hi         = lvl_pm[l-1][2*n+1] < lvl_pm[l-1][2*n];
      assign lvl_pm[l][n]    = take_hi ? lvl_pm[l-1][2*n+1]  : lvl_pm[l-1][2*n];
      assign lvl_idx[l][n]   = take_hi ? lvl_idx[l-1][2*n+1] : lvl_idx[l-1][2*n];
    end
    for (genvar n = (NST >> l); n < NST; n++) begin : g_unused
      assign lvl_pm[l][n]  = '0;
      assign lvl_idx[l][n] = '0;
    end
  end

  assign best_state = lvl_idx[SWB][0];
  assign dec_bit    = dec[best_state];
  assign next_state = {init_state[SWB-2:0], dec_bit};

endmodule
