// vit_input_buffer: circular buffer holding the most recent L received
// symbols, the trace-forward window of the MRE decoder.
//
// Symbols are written at the tail and read by position relative to the
// head, the oldest symbol still needed. One decoding process reads the
// window head+0 ... head+L-1 one symbol per trellis stage; when it has
// decoded the bit belonging to the head symbol, that symbol is popped and
// the window moves on by one. Each entry also carries a "last" flag that
// marks the final symbol of a frame, so the decoder can shorten its window
// at the end of a frame.
//
// Interface: in_valid/in_ready handshake for writes (ready while fewer than
// DEPTH symbols are held); rd_off selects the entry head+rd_off for the
// combinational read port rd_sym/rd_last; count is the number of symbols
// held; head_last is the last flag of the head entry; pop discards the head
// entry. A write and a pop may happen in the same cycle. Popping an empty
// buffer is ignored and flagged by an assertion.
// Reset: synchronous, active low, buffer empty.
module vit_input_buffer
  import vit_pkg::*;
#(
  parameter int DEPTH = vit_pkg::L,
  parameter int W     = vit_pkg::SYMW
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [W-1:0]                  in_sym,
  input  logic                          in_last,
  input  logic [$clog2(DEPTH)-1:0]      rd_off,
  output logic [W-1:0]                  rd_sym,
  output logic                          rd_last,
  output logic [$clog2(DEPTH+1)-1:0]    count,
  output logic                          head_last,
  input  logic                          pop
);

  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem_sym  [DEPTH];
  logic [DEPTH-1:0] mem_last;
  logic [AW-1:0] head, tail;
  logic          do_wr, do_pop;

  // Wrapping add of an offset below DEPTH.
  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] a,
                                             input logic [AW-1:0] b);
    logic [AW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= (AW+1)'(DEPTH)) s = s - (AW+1)'(DEPTH);
    return s[AW-1:0];
  endfunction

  logic [AW-1:0] rd_addr;

  assign in_ready  = count < CW'(DEPTH);
  assign do_wr     = in_valid && in_ready;
  assign do_pop    = pop && (count != '0);
  assign rd_addr   = wrap_add(head, rd_off);
  assign rd_sym    = mem_sym[rd_addr];
  assign rd_last   = mem_last[rd_addr];
  assign head_last = mem_last[head];

  always_ff @(posedge clk) begin
    if (do_wr) begin
      mem_sym[tail]  <= in_sym;
      mem_last[tail] <= in_last;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_wr)  tail <= wrap_add(tail, AW'(1));
      if (do_pop) head <= wrap_add(head, AW'(1));
      count <= count + CW'(do_wr) - CW'(do_pop);
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != '0)
    else $error("vit_input_buffer: pop while empty");

endmodule
