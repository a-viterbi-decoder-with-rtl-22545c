// vit_dec_mem: MRE decision memory, one bit per trellis state.
//
// Entry s holds the first-stage decoded bit of the surviving path that ends
// in state s: the input bit of the first transition of that path, counted
// from the initial state of the current decoding process. All 2^(K-1) bits
// are rewritten every trellis stage with the values chosen by the ACS unit
// (a one-bit register exchange), so the whole memory is a register bank of
// 256 bits instead of the L x 256 bits of a full register exchange.
//
// Interface: wr_en writes dec_wr into all entries at the clock edge;
// dec_rd is the stored vector. Reset: synchronous, active low, all zeros.
module vit_dec_mem
  import vit_pkg::*;
#(
  parameter int SWB = vit_pkg::SW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [(1<<SWB)-1:0]   dec_wr,
  output logic [(1<<SWB)-1:0]   dec_rd
);

  always_ff @(posedge clk) begin
    if (!rst_n)     dec_rd <= '0;
    else if (wr_en) dec_rd <= dec_wr;
  end

endmodule
