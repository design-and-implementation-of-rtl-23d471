// idea_ref_pkg: reference model of IDEA and of the temporal key schedule,
// used by the testbenches to work out expected values without the RTL.
//
// Everything is written with plain integer arithmetic: multiplication
// modulo 65537 by '%', inverses by the extended Euclidean algorithm, the
// standard IDEA key schedule (52 words read from the key, turning it left by
// 25 bits after every 8 words) and the temporal schedule (per stage: wait
// t clocks with t the key bits at the agreed positions, take the top 96
// bits, turn the key by t+3 bits in all).
package idea_ref_pkg;
  import idea_pkg::*;

  function automatic word_t ref_mul(word_t a, word_t b);
    longint unsigned x, y;
    x = (a == 0) ? 65536 : 64'(a);
    y = (b == 0) ? 65536 : 64'(b);
    return word_t'((x * y) % 65537);
  endfunction

  function automatic word_t ref_inv(word_t a);
    longint t, newt, r, newr, q, tmp;
    t = 0; newt = 1; r = 65537; newr = (a == 0) ? 65536 : 64'(a);
    while (newr != 0) begin
      q = r / newr;
      tmp = t - q * newt; t = newt; newt = tmp;
      tmp = r - q * newr; r = newr; newr = tmp;
    end
    if (t < 0) t += 65537;
    return word_t'(t);
  endfunction

  function automatic block_t ref_round(block_t x, round_keys_t k);
    word_t a, b, c, d, t0, t1, t2;
    a  = ref_mul(x[0], k[0]);
    b  = x[1] + k[1];
    c  = x[2] + k[2];
    d  = ref_mul(x[3], k[3]);
    t0 = ref_mul(a ^ c, k[4]);
    t1 = ref_mul((b ^ d) + t0, k[5]);
    t2 = t0 + t1;
    return '{a ^ t1, c ^ t1, b ^ t2, d ^ t2};
  endfunction

  function automatic block_t ref_output(block_t x, out_keys_t k);
    return '{ref_mul(x[0], k[0]), x[2] + k[1], x[1] + k[2], ref_mul(x[3], k[3])};
  endfunction

  function automatic block_t ref_cipher(block_t x, subkeys_t s);
    round_keys_t rk;
    out_keys_t   ok;
    block_t      v = x;
    for (int r = 0; r < 8; r++) begin
      for (int j = 0; j < 6; j++) rk[j] = s[6*r + j];
      v = ref_round(v, rk);
    end
    for (int j = 0; j < 4; j++) ok[j] = s[48 + j];
    return ref_output(v, ok);
  endfunction

  function automatic subkeys_t ref_std_subkeys(key_t key);
    subkeys_t s;
    key_t     k = key;
    int       n = 0;
    while (n < 52) begin
      for (int j = 0; j < 8 && n < 52; j++) begin
        s[n] = k[127 - 16*j -: 16];
        n++;
      end
      k = {k[102:0], k[127:103]};
    end
    return s;
  endfunction

  function automatic subkeys_t ref_dec_subkeys(subkeys_t e);
    subkeys_t d;
    for (int r = 0; r < 9; r++) begin
      int src = 6 * (8 - r);
      d[6*r + 0] = ref_inv(e[src + 0]);
      d[6*r + 3] = ref_inv(e[src + 3]);
      if (r == 0 || r == 8) begin
        d[6*r + 1] = word_t'(0) - e[src + 1];
        d[6*r + 2] = word_t'(0) - e[src + 2];
      end else begin
        d[6*r + 1] = word_t'(0) - e[src + 2];
        d[6*r + 2] = word_t'(0) - e[src + 1];
      end
      if (r < 8) begin
        d[6*r + 4] = e[src - 2];
        d[6*r + 5] = e[src - 1];
      end
    end
    return d;
  endfunction

  function automatic key_t rotl(key_t k, int n);
    key_t v = k;
    for (int i = 0; i < n; i++) v = {v[126:0], v[127]};
    return v;
  endfunction

  // time value: key bits at the given positions, first position most significant
  function automatic int time_of(key_t k, int pos [$]);
    int t = 0;
    foreach (pos[i]) t = (t << 1) | int'(k[pos[i]]);
    return t;
  endfunction

  // temporal schedule of one block: sub-keys, time values, the key left
  // for the next block and the number of clocks the schedule takes
  function automatic void ref_temporal(input key_t key, input int pos [$], output subkeys_t s,
                                       output int times [9], output key_t key_after,
                                       output int clocks);
    key_t k = key;
    clocks = 0;
    s = '0;
    for (int st = 0; st < 9; st++) begin
      key_t picked;
      times[st] = time_of(k, pos);
      picked = rotl(k, times[st]);
      for (int j = 0; j < 6; j++)
        if (st < 8 || j < 4) s[6*st + j] = picked[127 - 16*j -: 16];
      k = rotl(k, times[st] + 3);
      clocks += times[st] + 3;
    end
    key_after = k;
  endfunction

endpackage
