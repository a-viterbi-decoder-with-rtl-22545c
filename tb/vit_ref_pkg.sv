// vit_ref_pkg: reference models used by the testbenches of the IS-95
// rate 1/3, K = 9 encoder and MRE Viterbi decoder. Written independently
// of the RTL, with plain integer arrays.
//
// ref_code   : code bits of one transition from a 9-entry shift register
//              (reg[0] = current input bit, reg[i] = input i steps ago).
// ref_bm     : branch metric, sum of |soft - ideal level| over 3 code bits.
// ref_decode : the MRE decoding rule. For bit t of a frame of m symbols it
//              runs a trace-forward from the known state of time t over
//              symbols t .. min(t+45, m)-1, keeping for every state only the
//              input bit of the survivor's first transition, and takes the
//              bit of the state with the smallest metric (lowest state on a
//              tie; on an ACS tie the predecessor with top state bit 0).
package vit_ref_pkg;

  localparam int RK   = 9;
  localparam int RNS  = 256;
  localparam int RL   = 45;
  localparam int RINF = 1023;
  localparam int GOCT [3] = '{'o577, 'o663, 'o711};   // C0, C1, C2

  // Code bit j for shift register contents sr[0..8].
  function automatic int ref_code_bit(int j, int sr[9]);
    int c = 0;
    for (int i = 0; i < RK; i++)
      if (((GOCT[j] >> (RK - 1 - i)) & 1) != 0) c ^= sr[i];
    return c;
  endfunction

  // Code word {c2,c1,c0} of the transition from state st (bit 0 = most
  // recent input) on input u.
  function automatic int ref_code(int st, int u);
    int sr[9];
    int cw = 0;
    sr[0] = u;
    for (int i = 1; i < RK; i++) sr[i] = (st >> (i - 1)) & 1;
    for (int j = 0; j < 3; j++) cw |= ref_code_bit(j, sr) << j;
    return cw;
  endfunction

  function automatic int ref_bm(int sym, int cw);
    int bm = 0;
    for (int j = 0; j < 3; j++) begin
      int r = (sym >> (3 * j)) & 7;
      bm += ((cw >> j) & 1) ? (7 - r) : r;
    end
    return bm;
  endfunction

  function automatic int sat_add(int a, int b);
    return (a + b > RINF) ? RINF : a + b;
  endfunction

  // One MRE decoding process: start state s0, symbols syms[t0 .. t1-1].
  function automatic int ref_process(int s0, const ref int syms[$], int t0, int t1);
    int pm[RNS], dec[RNS], npm[RNS], ndec[RNS];
    int best;
    for (int s = 0; s < RNS; s++) begin pm[s] = RINF; dec[s] = 0; end
    pm[s0] = 0;
    for (int t = t0; t < t1; t++) begin
      for (int ns = 0; ns < RNS; ns++) begin
        int u  = ns & 1;
        int pa = ns >> 1;
        int pb = (ns >> 1) | 128;
        int ma = sat_add(pm[pa], ref_bm(syms[t], ref_code(pa, u)));
        int mb = sat_add(pm[pb], ref_bm(syms[t], ref_code(pb, u)));
        if (mb < ma) begin npm[ns] = mb; ndec[ns] = (t == t0) ? u : dec[pb]; end
        else         begin npm[ns] = ma; ndec[ns] = (t == t0) ? u : dec[pa]; end
      end
      pm = npm; dec = ndec;
    end
    best = 0;
    for (int s = 1; s < RNS; s++) if (pm[s] < pm[best]) best = s;
    return dec[best];
  endfunction

  // Decode a whole frame; the encoder starts it in state 0.
  function automatic void ref_decode(const ref int syms[$], ref int bits[$]);
    int st = 0;
    int m = syms.size();
    bits.delete();
    for (int t = 0; t < m; t++) begin
      int t1 = (t + RL < m) ? t + RL : m;
      int b  = ref_process(st, syms, t, t1);
      bits.push_back(b);
      st = ((st << 1) | b) & (RNS - 1);
    end
  endfunction

endpackage
