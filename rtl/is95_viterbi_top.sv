// is95_viterbi_top: IS-95 reverse-link convolutional coding chain, the
// rate 1/3, K = 9 encoder and the modified-register-exchange Viterbi decoder
// placed side by side.
//
// The encoder and the decoder are independent: the channel (modulation,
// noise, soft demodulation) lies between them and outside this design, so
// each brings its own ports out. A loop-back test drives the encoder, turns
// its code bits into 3-bit soft values, adds errors and feeds the decoder.
//
// Encoder side: enc_clear starts a frame from the zero state, enc_in_valid /
// enc_in_bit give one information bit per clock, enc_out_valid/enc_out_code
// return the three code bits {C2, C1, C0} one clock later.
// Decoder side: dec_in_valid/dec_in_ready/dec_in_sym/dec_in_last take soft
// symbols {r2, r1, r0} (0 = confident '0', 7 = confident '1'),
// dec_out_valid/dec_out_bit/dec_out_last give the decoded bits, one every
// 45 clocks for a continuous stream.
// Clock and synchronous active-low reset are shared.
module is95_viterbi_top
  import vit_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // encoder
  input  logic            enc_clear,
  input  logic            enc_in_valid,
  input  logic            enc_in_bit,
  output logic            enc_out_valid,
  output logic [N-1:0]    enc_out_code,
  // decoder
  input  logic            dec_in_valid,
  output logic            dec_in_ready,
  input  logic [SYMW-1:0] dec_in_sym,
  input  logic            dec_in_last,
  output logic            dec_out_valid,
  output logic            dec_out_bit,
  output logic            dec_out_last
);

  conv_enc u_enc (
    .clk, .rst_n,
    .clear    (enc_clear),
    .in_valid (enc_in_valid),
    .in_bit   (enc_in_bit),
    .out_valid(enc_out_valid),
    .out_code (enc_out_code)
  );

  vit_decoder u_dec (
    .clk, .rst_n,
    .in_valid (dec_in_valid),
    .in_ready (dec_in_ready),
    .in_sym   (dec_in_sym),
    .in_last  (dec_in_last),
    .out_valid(dec_out_valid),
    .out_bit  (dec_out_bit),
    .out_last (dec_out_last)
  );

endmodule
