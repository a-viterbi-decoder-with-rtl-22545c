// vit_acs: one add-compare-select element with a one-bit register exchange.
//
// A trellis state has two predecessors, a and b. The element adds each
// predecessor's path metric to the branch metric of its transition, using a
// saturating add so that the all-ones "unreachable" metric stays
// unreachable, compares the two sums and keeps the smaller. On a tie the
// a-branch is kept (this design's choice). Along with the metric it selects
// the survivor's stored decoded bit: this is the register exchange of the
// MRE scheme, cut down to the single first-stage bit per state.
//
// Interface: purely combinational.
module vit_acs #(
  parameter int PMB = 10,
  parameter int BMB = 5
) (
  input  logic [PMB-1:0] pm_a,
  input  logic [PMB-1:0] pm_b,
  input  logic [BMB-1:0] bm_a,
  input  logic [BMB-1:0] bm_b,
  input  logic           dec_a,
  input  logic           dec_b,
  output logic [PMB-1:0] pm_out,
  output logic           dec_out
);

  logic [PMB:0]   sum_a, sum_b;
  logic [PMB-1:0] sat_a, sat_b;
  logic           sel;            // 1: the b-branch survives

  always_comb begin
    sum_a   = {1'b0, pm_a} + (PMB+1)'(bm_a);
    sum_b   = {1'b0, pm_b} + (PMB+1)'(bm_b);
    sat_a   = sum_a[PMB] ? '1 : sum_a[PMB-1:0];
    sat_b   = sum_b[PMB] ? '1 : sum_b[PMB-1:0];
    sel     = sat_b < sat_a;
    pm_out  = sel ? sat_b : sat_a;
    dec_out = sel ? dec_b : dec_a;
  end

endmodule
