// tb_mre_packet_sizes: decoding-efficiency workload of the MRE decoder.
//
// Decodes one frame each of m = 45, 100, 192 (an IS-95 frame) and 1,000
// symbols at full size, with the source always ready, and measures the
// clocks from the first accepted symbol to the frame's last decoded bit.
// Every bit is checked against the reference MRE decoder (and, for the
// noise-free frames, against the bits sent). The clock count must equal the
// sum of the trace-forward window lengths, 45 x (m - 44) + (44 + ... + 1),
// within a 3-clock pipeline allowance; the efficiency m / clocks is printed
// next to the 1/45 = 0.022 bit per clock of a fixed 45-clock process.
module tb_mre_packet_sizes;
  import vit_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [8:0] in_sym = '0;
  logic       out_valid, out_bit, out_last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vit_decoder dut (.*);

  localparam int NF = 4;
  int frame_len   [NF] = '{45, 100, 192, 1000};
  int frame_noise [NF] = '{0, 3, 2, 0};

  int syms[$], sent[$], exp_bits[$];
  longint cycle = 0, t_first = 0;
  bit   ready_to_go = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build(int m, int noise);
    int st = 0;
    int rb[$];
    syms.delete(); sent.delete();
    for (int t = 0; t < m; t++) begin
      int b = (t >= m - 8) ? 0 : $urandom_range(0, 1);
      int cw = ref_code(st, b);
      int sym = 0;
      for (int j = 0; j < 3; j++) begin
        int r = ((cw >> j) & 1) ? 7 : 0;
        if (noise > 0) begin
          int d = $urandom_range(0, noise);
          r = ((cw >> j) & 1) ? r - d : r + d;
        end
        sym |= r << (3 * j);
      end
      syms.push_back(sym); sent.push_back(b);
      st = ((st << 1) | b) & 255;
    end
    ref_decode(syms, rb);
    exp_bits = rb;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < NF; f++) begin
      automatic int m = frame_len[f];
      automatic int n = 0;
      automatic longint expect_clk = 45 * (m - 44) + 44 * 45 / 2;
      automatic longint took;
      build(m, frame_noise[f]);
      fork
        // source
        begin
          foreach (syms[i]) begin
            @(negedge clk);
            in_valid = 1'b1;
            in_sym   = 9'(syms[i]);
            in_last  = (i == m - 1);
            #1;
            while (!in_ready) begin @(negedge clk); #1; end
            if (i == 0) t_first = cycle;
            @(posedge clk);
            #1 in_valid = 1'b0;
          end
        end
        // sink
        begin
          while (n < m) begin
            @(posedge clk); #1;
            if (out_valid) begin
              checks++;
              if (int'(out_bit) != exp_bits[n]) begin
                failures++; $display("m=%0d bit %0d: got %0d ref %0d", m, n, out_bit, exp_bits[n]);
              end
              if (frame_noise[f] == 0) begin
                checks++;
                if (int'(out_bit) != sent[n]) begin
                  failures++; $display("m=%0d bit %0d: noise-free frame decoded wrong", m, n);
                end
              end
              n++;
            end
          end
        end
      join
      took = cycle - t_first;
      $display("m=%0d: %0d clocks, efficiency %f bit/clock (fixed 45-clock processes: %f)",
               m, took, real'(m) / real'(took), 1.0 / 45.0);
      checks++;
      if (took < expect_clk || took > expect_clk + 3) begin
        failures++; $display("m=%0d: expected about %0d clocks", m, expect_clk);
      end
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
