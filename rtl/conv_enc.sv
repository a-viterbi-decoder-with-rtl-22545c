// conv_enc: IS-95 reverse-link convolutional encoder, rate 1/3, K = 9.
//
// Each accepted information bit u is shifted into an 8-bit state register
// and produces three code bits C0..C2, the modulo-2 sums of the taps of the
// generator polynomials over {state, u} (see vit_pkg for the bit order).
// The generator polynomials default to 577, 663 and 711 octal, the values
// the design is built for; the tap structure (one input, eight delays, three
// modulo-2 sums) follows the IS-95 encoder it models, the handshake and
// clear input are this design's own.
//
// Interface: in_valid/in_bit offer one information bit per cycle (no
// back-pressure). clear returns the state register to all zeros, which is
// how a frame starts; it is this design's choice to accept a bit in the same
// cycle as clear, encoded from the zero state. out_valid/out_code give the
// three code bits {C2, C1, C0} one cycle after the bit was accepted.
// Reset: synchronous, active low, state and outputs cleared.
module conv_enc
  import vit_pkg::*;
#(
  parameter int                    NC = vit_pkg::N,    // code bits per info bit
  parameter int                    KC = vit_pkg::K,    // constraint length
  parameter logic [NC-1:0][KC-1:0] G  = vit_pkg::GEN   // generators, [j] = Cj
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic          in_bit,
  output logic          out_valid,
  output logic [NC-1:0] out_code
);

  logic [KC-2:0] state;
  logic [KC-2:0] state_base;
  logic [KC-1:0] vec;
  logic [NC-1:0]  code;

  assign state_base = clear ? '0 : state;
  assign vec        = {state_base, in_bit};

  always_comb begin
    for (int j = 0; j < NC; j++) begin
      code[j] = 1'b0;
      for (int i = 0; i < KC; i++) code[j] ^= vec[i] & G[j][KC-1-i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      out_code  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        state    <= vec[KC-2:0];
        out_code <= code;
      end else if (clear) begin
        state    <= '0;
      end
    end
  end

endmodule
