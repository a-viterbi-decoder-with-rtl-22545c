// tb_is95_viterbi_top: end-to-end test of the IS-95 reverse-link coding
// chain at full size (K = 9, 256 states, L = 45, 3-bit soft inputs).
//
// Phase 1 drives information bits through the top's encoder, three
// 192-bit IS-95 frames (184 data bits and 8 zero tail bits) and one short
// 20-bit frame, and checks every code word against the reference model.
// Phase 2 turns the code words into soft symbols with noise and hard
// errors, feeds them to the decoder (frame 0 as a gap-free stream, frame 1
// noise-free, frame 2 with random input gaps, frame 3 short) and checks
// each decoded bit against the reference MRE decoder, the noise-free frame
// also against the sent bits.
//
// Mechanisms counted (each must occur): steady streaming at one bit per
// 45 clocks (decision overlapped with the next first stage), the input
// buffer full and holding off the source, a trace-forward stalled waiting
// for a symbol, windows shortened at a frame end, frame-end flags, and
// unreachable (saturated) path metrics at the start of a process.
module tb_is95_viterbi_top;
  import vit_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       enc_clear = 1'b0, enc_in_valid = 1'b0, enc_in_bit = 1'b0;
  logic       enc_out_valid;
  logic [2:0] enc_out_code;
  logic       dec_in_valid = 1'b0, dec_in_ready, dec_in_last = 1'b0;
  logic [8:0] dec_in_sym = '0;
  logic       dec_out_valid, dec_out_bit, dec_out_last;

  int checks = 0, failures = 0;
  int n_stream = 0, n_backpressure = 0, n_stall = 0, n_short = 0;
  int n_frame_end = 0, n_unreachable = 0;

  always #5 clk = ~clk;

  is95_viterbi_top dut (.*);

  localparam int NF = 4;
  int frame_len   [NF] = '{192, 192, 192, 20};
  int frame_noise [NF] = '{3, 0, 4, 2};
  int frame_gappy [NF] = '{0, 0, 1, 0};

  int sent[$], codes[$], syms[$], lasts[$], gaps[$], exp_bits[$], clean[$];
  int flen[$];
  bit phase2 = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- phase 1: encoder ----------------
  initial begin
    int st;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NF; f++) begin
      st = 0;
      for (int t = 0; t < frame_len[f]; t++) begin
        automatic int b = (t >= frame_len[f] - 8) ? 0 : $urandom_range(0, 1);
        automatic int ec = ref_code(st, b);
        @(negedge clk);
        enc_clear    = (t == 0);
        enc_in_valid = 1'b1;
        enc_in_bit   = b[0];
        @(posedge clk); #1;
        enc_in_valid = 1'b0;
        enc_clear    = 1'b0;
        checks += 2;
        if (!enc_out_valid) begin failures++; $display("encoder valid missing"); end
        if (int'(enc_out_code) != ec) begin
          failures++; $display("frame %0d bit %0d code %0d exp %0d", f, t, enc_out_code, ec);
        end
        sent.push_back(b);
        codes.push_back(int'(enc_out_code));
        st = ((st << 1) | b) & 255;
      end
    end
    // soft symbols and reference decoding, frame by frame
    for (int f = 0, base = 0; f < NF; base += frame_len[f], f++) begin
      automatic int fs[$], rb[$];
      fs.delete();
      for (int t = 0; t < frame_len[f]; t++) begin
        automatic int cw = codes[base + t];
        automatic int sym = 0;
        for (int j = 0; j < 3; j++) begin
          automatic int r = ((cw >> j) & 1) ? 7 : 0;
          if (frame_noise[f] > 0) begin
            automatic int d = $urandom_range(0, frame_noise[f]);
            r = ((cw >> j) & 1) ? r - d : r + d;
            if ($urandom_range(0, 50) == 0) r = 7 - r;
          end
          sym |= r << (3 * j);
        end
        fs.push_back(sym);
        syms.push_back(sym);
        lasts.push_back(t == frame_len[f] - 1);
        gaps.push_back(frame_gappy[f]);
        clean.push_back(frame_noise[f] == 0);
      end
      ref_decode(fs, rb);
      foreach (rb[i]) exp_bits.push_back(rb[i]);
    end
    phase2 = 1;
    // ---------------- phase 2: decoder ----------------
    foreach (syms[i]) begin
      @(negedge clk);
      while (gaps[i] != 0 && $urandom_range(0, 60) != 0) begin
        dec_in_valid = 1'b0;
        @(negedge clk);
      end
      dec_in_valid = 1'b1;
      dec_in_sym   = 9'(syms[i]);
      dec_in_last  = lasts[i] != 0;
      #1;
      while (!dec_in_ready) begin
        n_backpressure++;
        @(negedge clk); #1;
      end
      @(posedge clk);
      #1 dec_in_valid = 1'b0;
    end
  end

  // ---------------- internal event counters ----------------
  always @(posedge clk) if (phase2) begin
    // a trace-forward waiting for a symbol that has not arrived
    if (dut.u_dec.k_q != '0 && !dut.u_dec.step) n_stall++;
    // first stage of a process: the other 254 states must be unreachable
    if (dut.u_dec.step && dut.u_dec.k_run == '0 && dut.u_dec.pm_rd[1] == '1
        && dut.u_dec.pm_rd[dut.u_dec.cur_init ^ 8'd1] == '1) n_unreachable++;
  end

  // ---------------- monitor ----------------
  initial begin
    static int n = 0;
    static longint cycle = 0, last_cycle = -1;
    static longint t_start = 0;
    wait (phase2);
    t_start = 0;
    while (n < syms.size()) begin
      @(posedge clk);
      cycle++;
      #1;
      if (dec_out_valid) begin
        checks += 2;
        if (int'(dec_out_bit) != exp_bits[n]) begin
          failures++; $display("bit %0d: got %0d ref %0d", n, dec_out_bit, exp_bits[n]);
        end
        if (int'(dec_out_last) != lasts[n]) begin
          failures++; $display("bit %0d: last flag %0d", n, dec_out_last);
        end
        if (clean[n] != 0) begin
          checks++;
          if (int'(dec_out_bit) != sent[n]) begin
            failures++; $display("bit %0d: noise-free frame decoded wrong", n);
          end
        end
        if (last_cycle >= 0) begin
          if (cycle - last_cycle == 45) n_stream++;
          else if (cycle - last_cycle < 45) n_short++;
          // frame 0, bits 1..146: a full stream must give one bit per 45 clocks
          if (n >= 1 && n < 192 - 45) begin
            checks++;
            if (cycle - last_cycle != 45) begin
              failures++; $display("bit %0d: spacing %0d", n, cycle - last_cycle);
            end
          end
        end
        if (dec_out_last) n_frame_end++;
        last_cycle = cycle;
        n++;
      end
    end
    $display("decoded %0d bits in %0d clocks", n, cycle);
    $display("events: stream=%0d backpressure=%0d stall=%0d short_window=%0d frame_end=%0d unreachable_init=%0d",
             n_stream, n_backpressure, n_stall, n_short, n_frame_end, n_unreachable);
    checks += 6;
    if (n_stream == 0)       begin failures++; $display("no streaming observed"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure observed"); end
    if (n_stall == 0)        begin failures++; $display("no stall observed"); end
    if (n_short == 0)        begin failures++; $display("no shortened window observed"); end
    if (n_frame_end != NF)   begin failures++; $display("frame ends %0d", n_frame_end); end
    if (n_unreachable == 0)  begin failures++; $display("no unreachable start metrics"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
