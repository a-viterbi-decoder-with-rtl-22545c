// vit_decoder: Viterbi decoder using the modified register exchange (MRE)
// method, for a rate 1/3, K = 9 code with 3-bit soft decisions.
//
// One decoding process decodes one bit. It starts from a single known
// initial state with metric 0 (all other states unreachable) and runs a
// trace-forward over the L = 45 symbols of the input buffer, one trellis
// stage per clock with all 256 add-compare-select elements working in
// parallel. Instead of the L x 256-bit survivor memory of trace-back or of a
// full register exchange, each state keeps a single bit: the input bit of
// the first transition of its surviving path. After the last stage the
// state with the smallest metric is the survivor; its stored bit is the
// decoded bit, and the initial state shifted by that bit is the initial
// state of the next process, which runs over the window moved on by one
// symbol. No trace-back is needed.
//
// Blocks: vit_input_buffer (window of L symbols), vit_bm_calc (branch
// metrics), vit_acs_array (256 ACS), vit_pm_mem (path metrics),
// vit_dec_mem (first-stage decision bits), vit_decision_unit (survivor and
// next state), and the controller in this module.
//
// Controller (this design's own): a stage counter k runs 0..L-1; stage k
// reads the symbol head+k. If that symbol has not arrived yet the stage
// stalls. The window ends early at a symbol flagged last, so the final bits
// of a frame are decoded over shorter windows, one process per bit. The
// cycle after the last stage is a decide cycle: the survivor is picked, the
// bit is output, the head symbol is popped and, in the same cycle, stage 0
// of the next process already runs from the new initial state. A
// continuous stream therefore yields one bit every L clocks. After the last
// bit of a frame the initial state returns to 0, the encoder's start state.
//
// Interface: in_valid/in_ready/in_sym/in_last take one soft symbol
// {r2, r1, r0} per handshake; out_valid pulses with out_bit, out_last marks
// the final bit of a frame. The output cannot be stalled. out_bit follows
// one clock after the decide cycle. Reset: synchronous, active low.
//
// From the published MRE design: the one-bit-per-state decision memory, the
// decision by smallest metric, the next initial state from the decoded bit,
// K = 9, rate 1/3, L = 45, 3-bit soft inputs, 10-bit metrics and fully
// parallel ACS. This design's own: the controller and its overlap, the
// handshakes, frame-end handling, tie rules and the branch metric formula.
// Parameters NC, KC, G and LD also allow other codes (a K = 3, rate 1/2
// build is exercised by tb_mre_ber_k3).
module vit_decoder
  import vit_pkg::*;
#(
  parameter int                    NC  = vit_pkg::N,    // code bits per info bit
  parameter int                    KC  = vit_pkg::K,    // constraint length
  parameter logic [NC-1:0][KC-1:0] G   = vit_pkg::GEN,  // generators, [j] = Cj
  parameter int                    LD  = 5 * KC,        // trace-forward depth
  parameter int                    QB  = vit_pkg::Q,    // soft bits per code bit
  parameter int                    PMB = vit_pkg::PMW,  // path metric width
  parameter int                    BMB = vit_pkg::BMW   // branch metric width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [NC*QB-1:0] in_sym,
  input  logic             in_last,
  output logic             out_valid,
  output logic             out_bit,
  output logic             out_last
);

  localparam int SWB = KC - 1;
  localparam int NST = 1 << SWB;
  localparam int AW  = $clog2(LD);
  localparam int CW  = $clog2(LD + 1);

  // ---- datapath signals ----
  logic [AW-1:0]             rd_off;
  logic [NC*QB-1:0]           rd_sym;
  logic                      rd_last;
  logic [CW-1:0]             count;
  logic                      head_last;
  logic                      pop;
  logic [(1<<NC)-1:0][BMB-1:0] bm;
  logic [NST-1:0][PMB-1:0]   pm_rd, pm_nx, pm_stored;
  logic [NST-1:0]            dec_rd, dec_nx;
  logic                      step, first;
  logic [SWB-1:0]            cur_init;
  logic [SWB-1:0]            best_state, next_state;
  logic                      dec_bit;

  // ---- controller state ----
  logic [AW-1:0]  k_q;        // stage of the running process
  logic [SWB-1:0] init_q;     // initial state of the running process
  logic           decide_q;   // metrics hold the end of a trace-forward

  logic [SWB-1:0] init_after; // initial state after a decide
  logic [AW-1:0]  k_run;      // stage run in this cycle
  logic           sym_here;

  always_comb begin
    init_after = head_last ? '0 : next_state;
    cur_init   = decide_q ? init_after : init_q;
    k_run      = decide_q ? '0 : k_q;
    rd_off     = decide_q ? AW'(1) : k_q;
    // symbol head+rd_off present; after a decide the head is being popped
    sym_here   = CW'(rd_off) < count;
    step       = sym_here;
    first      = (k_run == '0);
    pop        = decide_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k_q      <= '0;
      init_q   <= '0;
      decide_q <= 1'b0;
    end else begin
      if (decide_q) init_q <= init_after;
      if (step) begin
        if (k_run == AW'(LD - 1) || rd_last) begin
          decide_q <= 1'b1;
          k_q      <= '0;
        end else begin
          decide_q <= 1'b0;
          k_q      <= k_run + AW'(1);
        end
      end else begin
        decide_q <= 1'b0;
        k_q      <= k_run;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= decide_q;
      if (decide_q) begin
        out_bit  <= dec_bit;
        out_last <= head_last;
      end
    end
  end

  // ---- datapath ----
  vit_input_buffer #(.DEPTH(LD), .W(NC*QB)) u_buf (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_sym, .in_last,
    .rd_off, .rd_sym, .rd_last, .count, .head_last, .pop
  );

  vit_bm_calc #(.NC(NC), .QB(QB), .BMB(BMB)) u_bm (
    .sym(rd_sym), .bm
  );

  vit_pm_mem #(.SWB(SWB), .PMB(PMB)) u_pm (
    .clk, .rst_n,
    .init(first), .init_state(cur_init),
    .wr_en(step), .pm_wr(pm_nx), .pm_rd, .pm_q(pm_stored)
  );

  vit_acs_array #(.NC(NC), .KC(KC), .G(G), .PMB(PMB), .BMB(BMB)) u_acs (
    .first, .pm_in(pm_rd), .dec_in(dec_rd), .bm,
    .pm_out(pm_nx), .dec_out(dec_nx)
  );

  vit_dec_mem #(.SWB(SWB)) u_dec (
    .clk, .rst_n, .wr_en(step), .dec_wr(dec_nx), .dec_rd
  );

  // The decision unit reads the stored metrics: in a decide cycle the PM
  // memory's read port already shows the next process's start values.

  vit_decision_unit #(.SWB(SWB), .PMB(PMB)) u_dunit (
    .pm(pm_stored), .dec(dec_rd), .init_state(init_q),
    .best_state, .dec_bit, .next_state
  );

endmodule
