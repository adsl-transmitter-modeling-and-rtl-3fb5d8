// adsl_pkg: constants and helper functions shared by the ADSL DMT transmitter.
//
// The numbers follow the G.lite downstream configuration: 128 sub-channels,
// a 256-point IFFT, a 16-sample cyclic prefix and superframes of 68 data
// frames plus one sync frame.  The Galois-field helpers serve the
// Reed-Solomon encoder; the field GF(256) with primitive polynomial
// x^8+x^4+x^3+x^2+1 and the generator roots alpha^0..alpha^(R-1) are the
// usual ADSL choices and are this design's assumption.
package adsl_pkg;

  localparam int unsigned N_TONES        = 128;  // sub-channels
  localparam int unsigned N_FFT          = 256;  // IFFT size (2 * N_TONES)
  localparam int unsigned CP_LEN         = 16;   // cyclic prefix length
  localparam int unsigned SF_DATA_FRAMES = 68;   // data frames per superframe
  localparam int unsigned R_MAX          = 16;   // largest RS parity count
  localparam int unsigned SAMPLE_W       = 18;   // time-domain sample width
  localparam int unsigned QAM_W          = 9;    // signed X/Y constellation width

  localparam logic [8:0] GF_POLY = 9'h11D;       // x^8+x^4+x^3+x^2+1

  typedef logic [7:0] byte_t;

  // Multiply two GF(256) elements (shift-and-add, reduced by GF_POLY).
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa[7] ? ((aa << 1) ^ GF_POLY[7:0]) : (aa << 1);
    end
    return p;
  endfunction

  // Coefficients of G(D) = prod_{i=0}^{r-1} (D + alpha^i), alpha = 2:
  // G is monic of degree r, coefficient j (of D^j) in bits [8j+7:8j],
  // coefficients above degree r are zero.
  function automatic logic [8*(R_MAX+1)-1:0] rs_gen_vec(int unsigned r);
    byte_t g [R_MAX+1];
    byte_t root;
    logic [8*(R_MAX+1)-1:0] v;
    for (int k = 0; k <= R_MAX; k++) g[k] = '0;
    g[0] = 8'd1;
    root = 8'd1;
    for (int unsigned i = 0; i < r; i++) begin
      // multiply g by (D + root), highest degree first
      for (int k = R_MAX; k > 0; k--) g[k] = g[k-1] ^ gf_mul(g[k], root);
      g[0] = gf_mul(g[0], root);
      root = gf_mul(root, 8'd2);
    end
    for (int j = 0; j <= R_MAX; j++) v[8*j +: 8] = g[j];
    return v;
  endfunction

  // Bit-reverse an index of the given width (at most 8 bits).
  function automatic logic [7:0] bitrev8(logic [7:0] x, int unsigned w);
    logic [7:0] r;
    r = '0;
    for (int unsigned i = 0; i < w; i++) r[i] = x[w-1-i];
    return r;
  endfunction

endpackage
