// tb_ref_pkg: reference models used by the testbenches, written apart from
// the RTL: a shift-register convolutional encoder for G1 = 1+Z+Z^2+Z^3 and
// G2 = 1+Z^2+Z^3, a bit-flip channel, and a register-exchange Viterbi
// decoder (every state carries its whole decoded history forward instead of
// a survivor memory being traced back). The reference decoder uses the same
// tie rules as the RTL: on equal candidates the predecessor whose oldest
// register bit is 0 wins, and at the end of a frame the lowest-numbered state
// among those with the smallest metric is chosen. State number = {newest,
// middle, oldest} input bit.
package tb_ref_pkg;

  localparam int MAXLEN = 512;

  typedef bit [1:0] sym_t;
  typedef bit       bits_t [MAXLEN];
  typedef sym_t     syms_t [MAXLEN];

  // Encode n bits starting from the all-zero register.
  function automatic void ref_encode(input bits_t d, input int n, output syms_t c);
    bit r0, r1, r2;  // r0 newest
    r0 = 0; r1 = 0; r2 = 0;
    for (int i = 0; i < MAXLEN; i++) c[i] = 2'b00;
    for (int i = 0; i < n; i++) begin
      c[i][1] = d[i] ^ r0 ^ r1 ^ r2;
      c[i][0] = d[i] ^ r1 ^ r2;
      r2 = r1; r1 = r0; r0 = d[i];
    end
  endfunction

  // Output of the reference encoder for one step from register (r0,r1,r2).
  function automatic sym_t ref_step(bit b, bit r0, bit r1, bit r2);
    return {b ^ r0 ^ r1 ^ r2, b ^ r1 ^ r2};
  endfunction

  // Register-exchange Viterbi decoding of n symbols; returns the best metric.
  function automatic int ref_viterbi(input syms_t rx, input int n, input int init_pm,
                                     output bits_t dec);
    int  pm [8], npm [8];
    bit [MAXLEN-1:0] hist [8];
    bit [MAXLEN-1:0] nhist [8];
    int best;
    for (int s = 0; s < 8; s++) begin
      pm[s] = (s == 0) ? 0 : init_pm;
      hist[s] = '0;
    end
    for (int t = 0; t < n; t++) begin
      for (int ns = 0; ns < 8; ns++) begin
        int  cand [2];
        bit  b;
        b = ns[2];
        for (int k = 0; k < 2; k++) begin
          // predecessor: newest = ns[1], middle = ns[0], oldest = k
          sym_t e, d;
          e = ref_step(b, ns[1], ns[0], k[0]);
          d = e ^ rx[t];
          cand[k] = pm[((ns & 3) << 1) | k] + d[1] + d[0];
        end
        if (cand[1] < cand[0]) begin
          npm[ns] = cand[1]; nhist[ns] = hist[((ns & 3) << 1) | 1];
        end else begin
          npm[ns] = cand[0]; nhist[ns] = hist[(ns & 3) << 1];
        end
        nhist[ns][t] = b;
      end
      for (int s = 0; s < 8; s++) begin
        pm[s] = npm[s];
        hist[s] = nhist[s];
      end
    end
    best = 0;
    for (int s = 1; s < 8; s++) if (pm[s] < pm[best]) best = s;
    for (int i = 0; i < MAXLEN; i++) dec[i] = hist[best][i];
    return pm[best];
  endfunction

endpackage
