// vit_pm_mem: path metric memory, one PMW-bit metric per trellis state.
//
// It holds the metrics between trellis stages of a decoding process. Every
// decoding process of the MRE decoder starts afresh from one known initial
// state, so the memory also provides the starting metrics: while init is
// high its read port shows 0 for state init_state and the all-ones
// "unreachable" value for every other state, instead of the stored metrics.
// This lets the first trellis stage of a new process run in the same cycle
// in which the previous process's decision is made.
//
// Interface: wr_en writes pm_wr into all entries at the clock edge;
// pm_rd is the (combinational) read port described above; pm_q is the
// stored metrics, whatever init says.
// Reset: synchronous, active low, all entries set to the unreachable value.
module vit_pm_mem
  import vit_pkg::*;
#(
  parameter int SWB = vit_pkg::SW,
  parameter int PMB = vit_pkg::PMW
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            init,
  input  logic [SWB-1:0]                  init_state,
  input  logic                            wr_en,
  input  logic [(1<<SWB)-1:0][PMB-1:0]    pm_wr,
  output logic [(1<<SWB)-1:0][PMB-1:0]    pm_rd,
  output logic [(1<<SWB)-1:0][PMB-1:0]    pm_q
);

  always_ff @(posedge clk) begin
    if (!rst_n)     pm_q <= '1;
    else if (wr_en) pm_q <= pm_wr;
  end

  always_comb begin
    for (int s = 0; s < (1 << SWB); s++)
      pm_rd[s] = !init ? pm_q[s] : (SWB'(s) == init_state) ? '0 : '1;
  end

endmodule
