// vit_acs_array: the fully parallel ACS unit, one vit_acs element per state.
//
// Every cycle it advances all 2^(K-1) path metrics by one trellis stage.
// State ns is reached on input bit u = ns[0] from the two predecessors
// {0, ns[K-2:1]} and {1, ns[K-2:1]}; the code word of each transition comes
// from the generator polynomials and selects one of the
// eight branch metrics. Alongside the metric, each state takes over the
// decoded bit stored for its surviving predecessor. In the first stage of a
// decoding process (first = 1) there is nothing to take over: the bit a
// state stores is then the input bit of the transition into it, ns[0]. That
// is the MRE rule of keeping only the first-stage decision of every path.
//
// Interface: combinational. pm_in/dec_in are the current metrics and
// decision bits, bm the eight branch metrics of the current symbol,
// pm_out/dec_out the values for the next stage.
module vit_acs_array
  import vit_pkg::*;
#(
  parameter int                    NC  = vit_pkg::N,    // code bits per info bit
  parameter int                    KC  = vit_pkg::K,    // constraint length
  parameter logic [NC-1:0][KC-1:0] G   = vit_pkg::GEN,  // generators, [j] = Cj
  parameter int                    PMB = vit_pkg::PMW,
  parameter int                    BMB = vit_pkg::BMW
) (
  input  logic                           first,
  input  logic [(1<<(KC-1))-1:0][PMB-1:0] pm_in,
  input  logic [(1<<(KC-1))-1:0]          dec_in,
  input  logic [(1<<NC)-1:0][BMB-1:0]     bm,
  output logic [(1<<(KC-1))-1:0][PMB-1:0] pm_out,
  output logic [(1<<(KC-1))-1:0]          dec_out
);

  localparam int NST = 1 << (KC - 1);

  // Code word of each incoming transition: register vector {pred, u}.
  function automatic logic [NC-1:0] code_of(input logic [KC-1:0] v);
    logic [NC-1:0] c;
    for (int j = 0; j < NC; j++) begin
      c[j] = 1'b0;
      for (int i = 0; i < KC; i++) c[j] ^= v[i] & G[j][KC-1-i];
    end
    return c;
  endfunction


  for (genvar ns = 0; ns < NST; ns++) begin : g_state
    localparam logic [KC-2:0] NSV = (KC-1)'(ns);
    localparam logic [KC-2:0] PA  = {1'b0, NSV[KC-2:1]};
    localparam logic [KC-2:0] PB  = {1'b1, NSV[KC-2:1]};

    localparam logic [NC-1:0] CA = code_of({PA, NSV[0]});
    localparam logic [NC-1:0] CB = code_of({PB, NSV[0]});

    logic dec_sel;

    vit_acs #(.PMB(PMB), .BMB(BMB)) u_acs (
      .pm_a   (pm_in[PA]),
      .pm_b   (pm_in[PB]),
      .bm_a   (bm[CA]),
      .bm_b   (bm[CB]),
      .dec_a  (dec_in[PA]),
      .dec_b  (dec_in[PB]),
      .pm_out (pm_out[ns]),
      .dec_out(dec_sel)
    );

    assign dec_out[ns] = first ? NSV[0] : dec_sel;
  end

endmodule
