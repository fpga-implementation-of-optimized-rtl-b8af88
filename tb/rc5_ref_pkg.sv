// rc5_ref_pkg: software reference model of RC5-32 for the testbenches.
//
// Plain behavioural functions written straight from the RC5 definition
// (key schedule and encryption), independent of the RTL state machines.
// encrypt() also reports how many rotate amounts came from words below 32
// in each half, which fixes the cycle count the RTL engine must show.
package rc5_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef w32_t        wq_t[$];
  typedef logic [7:0]  bq_t[$];

  function automatic w32_t rotl(w32_t x, int unsigned n);
    n = n % 32;
    if (n == 0) return x;
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic w32_t rotr(w32_t x, int unsigned n);
    return rotl(x, (32 - (n % 32)) % 32);
  endfunction

  // Full key schedule: returns the t = 2(r+1) words of S.
  function automatic wq_t expand(bq_t key, int unsigned rounds);
    int unsigned b, c, t, ii, jj;
    w32_t l[$], s[$], a, bb;
    b = key.size();
    c = (b + 3) / 4;
    if (c == 0) c = 1;
    t = 2 * (rounds + 1);
    for (int k = 0; k < c; k++) l.push_back(32'h0);
    for (int k = int'(b) - 1; k >= 0; k--) l[k/4] = (l[k/4] << 8) + w32_t'(key[k]);
    s.push_back(32'hb7e15163);
    for (int k = 1; k < t; k++) s.push_back(s[k-1] + 32'h9e3779b9);
    a = 0; bb = 0; ii = 0; jj = 0;
    for (int k = 0; k < 3 * ((t > c) ? t : c); k++) begin
      a = rotl(s[ii] + a + bb, 3);
      s[ii] = a;
      bb = rotl(l[jj] + a + bb, (a + bb) % 32);
      l[jj] = bb;
      ii = (ii + 1) % t;
      jj = (jj + 1) % c;
    end
    return s;
  endfunction

  // Encrypts (a, b) in place. n_small_b / n_small_a count rounds whose
  // B-half / A-half rotate amount came from a word below 32.
  function automatic void encrypt(inout w32_t a, inout w32_t b, input wq_t s,
                                  input int unsigned rounds,
                                  output int unsigned n_small_b,
                                  output int unsigned n_small_a);
    n_small_b = 0;
    n_small_a = 0;
    a = a + s[0];
    b = b + s[1];
    for (int i = 1; i <= rounds; i++) begin
      if (b < 32) n_small_b++;
      a = rotl(a ^ b, b % 32) + s[2*i];
      if (a < 32) n_small_a++;
      b = rotl(b ^ a, a % 32) + s[2*i+1];
    end
  endfunction

  // Cycles of the RTL engine from the edge that samples start to the edge
  // that raises done, inclusive.
  function automatic int unsigned enc_cycles(int unsigned rounds,
                                             int unsigned n_small_b,
                                             int unsigned n_small_a);
    return 3 + 13 * rounds - 2 * n_small_b - 2 * n_small_a;
  endfunction

endpackage
