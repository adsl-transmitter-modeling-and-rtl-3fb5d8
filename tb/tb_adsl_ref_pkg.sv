// tb_adsl_ref_pkg: reference models for the transmitter testbenches.
//
// Each function recomputes one stage of the transmitter from its
// mathematical definition, on whole arrays and with different algorithms
// from the RTL: the CRC and RS parity by polynomial long division, GF(256)
// products through log/antilog tables, the scrambler on a bit array, the
// interleaver by scheduling every byte at its output time, and the IFFT as
// a direct real-valued sum.  Bit order: the MSB of a byte is its earlier
// serial bit.
package tb_adsl_ref_pkg;

  typedef byte unsigned bq_t[$];

  // ---------------- CRC-8, G(D) = D^8+D^4+D^3+D^2+1 ----------------
  function automatic byte unsigned ref_crc8(bq_t msg);
    bit b[$];
    bit g[9] = '{1, 0, 0, 0, 1, 1, 1, 0, 1};   // D^8 .. D^0
    byte unsigned c;
    foreach (msg[i]) for (int k = 7; k >= 0; k--) b.push_back(msg[i][k]);
    repeat (8) b.push_back(1'b0);
    for (int i = 0; i + 8 < b.size(); i++)
      if (b[i]) for (int j = 0; j < 9; j++) b[i+j] ^= g[j];
    c = 0;
    for (int j = 0; j < 8; j++) c[7-j] = b[b.size()-8+j];
    return c;
  endfunction

  // ---------------- scrambler from the all-zero state ----------------
  function automatic bq_t ref_scramble(bq_t din);
    bit d[$];
    bq_t o;
    int n;
    n = 0;
    foreach (din[i]) begin
      byte unsigned ob;
      for (int k = 7; k >= 0; k--) begin
        bit x;
        x = din[i][k] ^ ((n >= 18) ? d[n-18] : 1'b0) ^ ((n >= 23) ? d[n-23] : 1'b0);
        d.push_back(x);
        ob[k] = x;
        n++;
      end
      o.push_back(ob);
    end
    return o;
  endfunction

  // ---------------- GF(256) by log tables ----------------
  function automatic void gf_tables(output int ex[512], output int lg[256]);
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      ex[i] = x; ex[i+255] = x; lg[x] = i;
      x = x << 1;
      if ((x & 256) != 0) x = x ^ 'h11D;
    end
    ex[510] = ex[0]; ex[511] = ex[1];
    lg[0] = -1;
  endfunction

  function automatic int gmul(int a, int b, const ref int ex[512], const ref int lg[256]);
    if (a == 0 || b == 0) return 0;
    return ex[lg[a] + lg[b]];
  endfunction

  // RS parity c0..c(R-1) of msg: remainder of M(D) D^R by prod (D + alpha^i)
  function automatic bq_t ref_rs_parity(bq_t msg, int r);
    int ex[512];
    int lg[256];
    int g[$];          // descending, g[0] = 1
    int p[$];
    bq_t o;
    gf_tables(ex, lg);
    g.push_back(1);
    for (int i = 0; i < r; i++) begin
      int ng[$];
      ng = g;
      ng.push_back(0);
      for (int j = 1; j < ng.size(); j++) ng[j] = ng[j] ^ gmul(g[j-1], ex[i], ex, lg);
      g = ng;
    end
    foreach (msg[i]) p.push_back(int'(msg[i]));
    repeat (r) p.push_back(0);
    for (int i = 0; i < msg.size(); i++) begin
      int c;
      c = p[i];
      if (c != 0) for (int j = 0; j <= r; j++) p[i+j] = p[i+j] ^ gmul(c, g[j], ex, lg);
    end
    for (int j = 0; j < r; j++) o.push_back(byte'(p[msg.size()+j]));
    return o;
  endfunction

  // evaluate a codeword (first byte = highest degree) at alpha^e
  function automatic int ref_rs_syndrome(bq_t cw, int e);
    int ex[512];
    int lg[256];
    int s;
    gf_tables(ex, lg);
    s = 0;
    foreach (cw[i]) s = gmul(s, ex[e % 255], ex, lg) ^ int'(cw[i]);
    return s;
  endfunction

  // ---------------- convolutional interleaver ----------------
  // byte I of an N' byte codeword leaves (D-1)*I steps after it enters;
  // even N with D > 1 gets a dummy byte in front, dropped at the output
  function automatic bq_t ref_interleave(bq_t din, int n, int d);
    int  np;
    bit  even;
    int  steps;
    int  sched[int];
    bit  is_dummy[int];
    int  idx, k;
    bq_t o;
    even  = (n % 2 == 0) && (d > 1);
    np    = even ? n + 1 : n;
    steps = 0;
    idx   = 0;
    k     = 0;
    while (k < din.size()) begin
      if (even && idx == 0) begin
        is_dummy[steps] = 1;
      end else begin
        sched[steps + (d-1)*idx] = int'(din[k]);
        k++;
      end
      steps++;
      idx = (idx + 1) % np;
    end
    for (int s = 0; s < steps; s++)
      if (!is_dummy.exists(s)) o.push_back(sched.exists(s) ? byte'(sched[s]) : 8'd0);
    return o;
  endfunction

  // ---------------- QAM mapping ----------------
  function automatic int axis(int v, int first, int nb);
    int a;
    a = 1;
    for (int i = 0; i < nb; i++) a += ((v >> (first + 2*i)) & 1) << (i + 1);
    if (a >= (1 << nb)) a -= (1 << (nb + 1));
    return a;
  endfunction

  function automatic void ref_qam(int v, int b, output int x, output int y);
    if (b == 0) begin x = 0; y = 0; end
    else if (b % 2 == 0) begin x = axis(v, 1, b/2); y = axis(v, 0, b/2); end
    else begin x = axis(v, 0, (b+1)/2); y = axis(v, 1, (b-1)/2); end
  endfunction

  // sync pattern: d(1..9) = 1, d(n) = d(n-4) ^ d(n-9); element 0 is d(1)
  function automatic void ref_sync_bits(int nbits, ref bit d[$]);
    d.delete();
    for (int n = 1; n <= nbits; n++)
      d.push_back((n <= 9) ? 1'b1 : (d[n-5] ^ d[n-10]));
  endfunction

  // ---------------- IFFT ----------------
  // x[n] = sum over tones k of 2*(X_k cos(2 pi k n/256) - Y_k sin(2 pi k n/256))
  function automatic real ref_sample(const ref int xs[128], const ref int ys[128], int n);
    real s, a;
    s = 0.0;
    for (int k = 1; k < 128; k++) begin
      a = 2.0 * 3.14159265358979323846 * real'(k * n) / 256.0;
      s += 2.0 * (real'(xs[k]) * $cos(a) - real'(ys[k]) * $sin(a));
    end
    return s;
  endfunction

endpackage
