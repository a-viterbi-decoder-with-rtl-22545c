// vit_bm_calc: soft-decision branch metric calculation.
//
// For one received symbol (NC soft values of Q = 3 bits, 0 = confident '0',
// 7 = confident '1') it computes the branch metric of all 2^NC possible
// code words (8 at rate 1/3). The metric of code word c is the sum over its
// code bits of the distance between the soft value r and the ideal level of
// the bit: r for a '0', (2^Q - 1) - r for a '1'. Smaller is more likely.
// This linear soft distance is this design's choice; it needs no multiplier
// and a 45-stage path metric sum of it stays below 2^10.
//
// Interface: sym is {r2, r1, r0}; bm[c] is the metric of code word c, with
// code bit j in bit j of c. Purely combinational.
module vit_bm_calc
  import vit_pkg::*;
#(
  parameter int NC  = vit_pkg::N,   // code bits per information bit
  parameter int QB  = vit_pkg::Q,
  parameter int BMB = vit_pkg::BMW
) (
  input  logic [NC*QB-1:0]             sym,
  output logic [(1<<NC)-1:0][BMB-1:0]  bm
);

  localparam logic [QB-1:0] QMAX = '1;

  logic [NC-1:0][QB-1:0] d0;   // distance to '0'
  logic [NC-1:0][QB-1:0] d1;   // distance to '1'

  always_comb begin
    for (int j = 0; j < NC; j++) begin
      d0[j] = sym[j*QB +: QB];
      d1[j] = QMAX - sym[j*QB +: QB];
    end
    for (int c = 0; c < (1 << NC); c++) begin
      bm[c] = '0;
      for (int j = 0; j < NC; j++)
        bm[c] += BMB'(c[j] ? d1[j] : d0[j]);
    end
  end

endmodule
