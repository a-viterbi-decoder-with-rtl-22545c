// tb_vit_decoder: self-checking testbench of the MRE Viterbi decoder.
//
// Frames of random information bits are encoded by the vit_ref_pkg model,
// turned into 3-bit soft symbols with random noise and occasional hard
// errors, and fed to the decoder with random gaps. Every decoded bit is
// compared with the reference MRE decoder (vit_ref_pkg::ref_decode); frames
// without noise must also return the original bits. Frame end flags are
// checked, and in a gap-free stream the spacing of decoded bits must be the
// L = 45 clocks of one trace-forward.
module tb_vit_decoder;
  import vit_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [8:0] in_sym = '0;
  logic       out_valid, out_bit, out_last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vit_decoder dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build one frame: random bits, ending in 8 zero tail bits if tail != 0.
  task automatic make_frame(int m, int noise, int tail, ref int bits[$], ref int syms[$]);
    int st = 0;
    bits.delete(); syms.delete();
    for (int t = 0; t < m; t++) begin
      int b = (tail != 0 && t >= m - 8) ? 0 : $urandom_range(0, 1);
      int cw = ref_code(st, b);
      int sym = 0;
      for (int j = 0; j < 3; j++) begin
        int r = ((cw >> j) & 1) ? 7 : 0;
        if (noise > 0) begin
          int d = $urandom_range(0, noise);
          r = ((cw >> j) & 1) ? r - d : r + d;
          if ($urandom_range(0, 60) == 0) r = 7 - r;   // hard error
          if (r < 0) r = 0;
          if (r > 7) r = 7;
        end
        sym |= r << (3 * j);
      end
      bits.push_back(b); syms.push_back(sym);
      st = ((st << 1) | b) & 255;
    end
  endtask

  int frame_len [4] = '{60, 12, 100, 50};
  int frame_noise [4] = '{0, 3, 4, 0};
  int frame_gappy [4] = '{0, 1, 1, 0};
  int frame_tail  [4] = '{1, 0, 1, 0};   // frames 1 and 3 end in an arbitrary state
  int all_syms[$], all_last[$], all_gap[$];
  int exp_bits[$], exp_last[$], orig_bits[$], is_clean[$];

  // driver
  initial begin
    int bits[$], syms[$], ref_bits[$];
    for (int f = 0; f < 4; f++) begin
      make_frame(frame_len[f], frame_noise[f], frame_tail[f], bits, syms);
      ref_decode(syms, ref_bits);
      for (int t = 0; t < frame_len[f]; t++) begin
        all_syms.push_back(syms[t]);
        all_last.push_back(t == frame_len[f] - 1);
        all_gap.push_back(frame_gappy[f]);
        exp_bits.push_back(ref_bits[t]);
        exp_last.push_back(t == frame_len[f] - 1);
        orig_bits.push_back(bits[t]);
        is_clean.push_back(frame_noise[f] == 0);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (all_syms[i]) begin
      @(negedge clk);
      while (all_gap[i] != 0 && $urandom_range(0, 30) != 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_sym   = 9'(all_syms[i]);
      in_last  = all_last[i] != 0;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 in_valid = 1'b0;
    end
  end

  // monitor
  initial begin
    static int n = 0;
    static longint last_cycle = -1, cycle = 0;
    static int spacing_checked = 0;
    while (n < exp_bits.size() || exp_bits.size() == 0) begin
      @(posedge clk);
      cycle++;
      #1;
      if (out_valid) begin
        checks += 2;
        if (int'(out_bit) != exp_bits[n]) begin
          failures++; $display("bit %0d: got %0d ref %0d", n, out_bit, exp_bits[n]);
        end
        if (int'(out_last) != exp_last[n]) begin
          failures++; $display("bit %0d: last got %0d", n, out_last);
        end
        if (is_clean[n] != 0) begin
          checks++;
          if (int'(out_bit) != orig_bits[n]) begin
            failures++; $display("bit %0d: clean frame decoded wrong", n);
          end
        end
        // frame 0 is gap-free and at least 2L long: a steady stream
        if (n >= 1 && n < frame_len[0] - 45 && last_cycle >= 0) begin
          checks++; spacing_checked++;
          if (cycle - last_cycle != 45) begin
            failures++; $display("bit %0d: spacing %0d clocks", n, cycle - last_cycle);
          end
        end
        last_cycle = cycle;
        n++;
      end
    end
    checks++;
    if (spacing_checked == 0) begin failures++; $display("no spacing checked"); end
    repeat (50) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("extra output"); end
    $display("decoded %0d bits", n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
