// tb_mre_ber_k3: bit-error-rate comparison of the MRE decoder with a
// trace-back Viterbi decoder on a K = 3, rate 1/2 code.
//
// The decoder is built with KC = 3, NC = 2, LD = 15 (= 5K) and the usual
// (7, 5) octal generators. For three channel qualities (Eb/N0 = 2, 3 and
// 4 dB) a 20,000-bit frame is BPSK-modulated, Gaussian noise is added and
// each sample is quantized to 3 bits. The decoder's output is compared with
// the bits sent, and so is the output of a behavioural full-frame trace-back
// Viterbi decoder with the same branch metric. The MRE decoder must not be
// noticeably worse (at most 25 % more errors plus 5), and both must beat
// the raw hard-decision error count of the channel.
module tb_mre_ber_k3;

  localparam int K3 = 3;
  localparam int NS3 = 4;
  localparam int NB = 20000;
  localparam logic [1:0][2:0] G3 = {3'o5, 3'o7};   // C1 = 5, C0 = 7

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [5:0] in_sym = '0;
  logic       out_valid, out_bit, out_last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vit_decoder #(.NC(2), .KC(K3), .G(G3), .LD(15)) dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // code word {c1, c0} from state st (bit 0 = most recent input) and input u
  function automatic int code3(int st, int u);
    int v = (st << 1) | u;          // v[0] = u, v[1] = previous, v[2] = older
    int c0 = 0, c1 = 0;
    for (int i = 0; i < 3; i++) begin
      if ((('o7 >> (2 - i)) & 1) != 0) c0 ^= (v >> i) & 1;
      if ((('o5 >> (2 - i)) & 1) != 0) c1 ^= (v >> i) & 1;
    end
    return (c1 << 1) | c0;
  endfunction

  function automatic int bm3(int sym, int cw);
    int m = 0;
    for (int j = 0; j < 2; j++) begin
      int r = (sym >> (3 * j)) & 7;
      m += ((cw >> j) & 1) ? 7 - r : r;
    end
    return m;
  endfunction

  function automatic real gauss();
    real u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    real u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  // full-frame trace-back Viterbi decoder (behavioural baseline)
  function automatic void tb_viterbi(const ref int syms[$], ref int bits[$]);
    int pm[NS3], npm[NS3];
    int surv[$];                    // per stage: 4 predecessor choices, 1 bit each
    int st, best;
    for (int s = 0; s < NS3; s++) pm[s] = (s == 0) ? 0 : 100000;
    foreach (syms[t]) begin
      int sel = 0;
      for (int ns = 0; ns < NS3; ns++) begin
        int u = ns & 1, pa = ns >> 1, pb = (ns >> 1) | 2;
        int ma = pm[pa] + bm3(syms[t], code3(pa, u));
        int mb = pm[pb] + bm3(syms[t], code3(pb, u));
        if (mb < ma) begin npm[ns] = mb; sel |= 1 << ns; end
        else npm[ns] = ma;
      end
      pm = npm;
      surv.push_back(sel);
    end
    best = 0;
    for (int s = 1; s < NS3; s++) if (pm[s] < pm[best]) best = s;
    bits.delete();
    st = best;
    for (int t = syms.size() - 1; t >= 0; t--) begin
      bits.push_front(st & 1);
      st = (((surv[t] >> st) & 1) != 0) ? ((st >> 1) | 2) : (st >> 1);
    end
  endfunction

  initial begin
    real ebn0_db [3] = '{2.0, 3.0, 4.0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int p = 0; p < 3; p++) begin
      automatic int sent[$], syms[$], ref_bits[$];
      automatic int raw_err = 0, mre_err = 0, tb_err = 0, n = 0;
      automatic int st = 0;
      automatic real sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (ebn0_db[p] / 10.0))));
      for (int t = 0; t < NB; t++) begin
        automatic int b = (t >= NB - 2) ? 0 : $urandom_range(0, 1);
        automatic int cw = code3(st, b);
        automatic int sym = 0;
        for (int j = 0; j < 2; j++) begin
          automatic int c = (cw >> j) & 1;
          automatic real x = (c != 0 ? 1.0 : -1.0) + sigma * gauss();
          automatic int q = int'((x + 1.0) * 3.5 + 0.5);
          if (x + 1.0 < 0.0) q = 0;
          if (q > 7) q = 7;
          if ((q >= 4 ? 1 : 0) != c) raw_err++;
          sym |= q << (3 * j);
        end
        sent.push_back(b); syms.push_back(sym);
        st = ((st << 1) | b) & 3;
      end
      tb_viterbi(syms, ref_bits);
      foreach (ref_bits[i]) if (ref_bits[i] != sent[i]) tb_err++;
      fork
        begin
          foreach (syms[i]) begin
            @(negedge clk);
            in_valid = 1'b1;
            in_sym   = 6'(syms[i]);
            in_last  = (i == NB - 1);
            #1;
            while (!in_ready) begin @(negedge clk); #1; end
            @(posedge clk);
            #1 in_valid = 1'b0;
          end
        end
        begin
          while (n < NB) begin
            @(posedge clk); #1;
            if (out_valid) begin
              if (int'(out_bit) != sent[n]) mre_err++;
              if (out_last != (n == NB - 1)) begin
                failures++; $display("frame-end flag wrong at bit %0d", n);
              end
              n++;
            end
          end
        end
      join
      $display("Eb/N0 %.1f dB: channel bit errors %0d of %0d, trace-back %0d, MRE %0d (BER %.2e / %.2e)",
               ebn0_db[p], raw_err, 2 * NB, tb_err, mre_err,
               real'(tb_err) / NB, real'(mre_err) / NB);
      checks += 3;
      if (real'(mre_err) > 1.25 * real'(tb_err) + 5.0) begin
        failures++; $display("MRE decoder clearly worse than trace-back");
      end
      if (mre_err * 2 >= raw_err) begin failures++; $display("MRE: no coding gain"); end
      if (tb_err * 2 >= raw_err) begin failures++; $display("trace-back: no coding gain"); end
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
