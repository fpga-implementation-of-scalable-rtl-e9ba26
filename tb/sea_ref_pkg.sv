// sea_ref_pkg: behavioural reference model of SEA_{n,b} for the testbenches.
//
// Written independently of the RTL: the S-box is applied through its table
// S = {0,5,6,7,4,3,1,2} bit position by bit position (the RTL uses the
// bit-sliced logic form), rotations and additions are computed word by word
// with loops, and encryption follows the cipher's description literally: the
// whole key schedule is computed first (with its two exchanges), then the
// data rounds. Decryption applies FD with the round keys in the reverse order
// of encryption. Halves are held in 128-bit vectors, so n <= 256; n, b and nr
// are run-time arguments.
package sea_ref_pkg;

  typedef logic [127:0] half_t;

  localparam logic [2:0] SBOX [8] = '{3'd0, 3'd5, 3'd6, 3'd7, 3'd4, 3'd3, 3'd1, 3'd2};

  function automatic logic [63:0] get_word(half_t x, int i, int b);
    logic [63:0] w = '0;
    for (int j = 0; j < b; j++) w[j] = x[i*b + j];
    return w;
  endfunction

  function automatic half_t put_word(half_t x, int i, int b, logic [63:0] w);
    for (int j = 0; j < b; j++) x[i*b + j] = w[j];
    return x;
  endfunction

  function automatic half_t mask_half(half_t x, int n);
    half_t m = '0;
    for (int j = 0; j < n/2; j++) m[j] = 1'b1;
    return x & m;
  endfunction

  function automatic half_t ref_add(half_t a, half_t c, int n, int b);
    half_t y = '0;
    logic [63:0] bmask = (64'd1 << b) - 64'd1;
    for (int i = 0; i < n/(2*b); i++)
      y = put_word(y, i, b, (get_word(a, i, b) + get_word(c, i, b)) & bmask);
    return y;
  endfunction

  function automatic half_t ref_sbox(half_t x, int n, int b);
    half_t y = '0;
    for (int g = 0; g < n/(6*b); g++)
      for (int j = 0; j < b; j++) begin
        logic [2:0] v, s;
        v = {x[(3*g+2)*b + j], x[(3*g+1)*b + j], x[(3*g)*b + j]};
        s = SBOX[v];
        y[(3*g)*b + j]   = s[0];
        y[(3*g+1)*b + j] = s[1];
        y[(3*g+2)*b + j] = s[2];
      end
    return y;
  endfunction

  // Rotate a b-bit word right (dir = 0) or left (dir = 1) by one bit.
  function automatic logic [63:0] rot1(logic [63:0] w, int b, bit left);
    logic [63:0] y = '0;
    for (int j = 0; j < b; j++)
      if (left) y[(j+1) % b] = w[j];
      else      y[j] = w[(j+1) % b];
    return y;
  endfunction

  function automatic half_t ref_brot(half_t x, int n, int b);
    half_t y = x;
    for (int g = 0; g < n/(6*b); g++) begin
      y = put_word(y, 3*g,   b, rot1(get_word(x, 3*g,   b), b, 1'b0));
      y = put_word(y, 3*g+2, b, rot1(get_word(x, 3*g+2, b), b, 1'b1));
    end
    return y;
  endfunction

  // Word rotation R: y_{i+1} = x_i, y_0 = x_{nb-1}; inv selects R^-1.
  function automatic half_t ref_wrot(half_t x, int n, int b, bit inv);
    half_t y = '0;
    int nb = n/(2*b);
    for (int i = 0; i < nb; i++)
      if (!inv) y = put_word(y, (i+1) % nb, b, get_word(x, i, b));
      else      y = put_word(y, i, b, get_word(x, (i+1) % nb, b));
    return y;
  endfunction

  function automatic void ref_fe(ref half_t l, ref half_t r, input half_t k,
                                 input int n, input int b);
    half_t f = ref_brot(ref_sbox(ref_add(r, k, n, b), n, b), n, b);
    half_t nr_ = ref_wrot(l, n, b, 1'b0) ^ f;
    l = r;
    r = nr_;
  endfunction

  function automatic void ref_fd(ref half_t l, ref half_t r, input half_t k,
                                 input int n, input int b);
    half_t f = ref_brot(ref_sbox(ref_add(r, k, n, b), n, b), n, b);
    half_t nr_ = ref_wrot(l ^ f, n, b, 1'b1);
    l = r;
    r = nr_;
  endfunction

  function automatic void ref_fk(ref half_t kl, ref half_t kr, input int c,
                                 input int n, input int b);
    half_t cv = put_word('0, 0, b, 64'(c) & ((64'd1 << b) - 64'd1));
    half_t g = ref_wrot(ref_brot(ref_sbox(ref_add(kr, cv, n, b), n, b), n, b), n, b, 1'b0);
    half_t t = kl ^ g;
    kl = kr;
    kr = t;
  endfunction

  // Round keys of rounds 1..nr (index 1..nr), as the cipher text defines them.
  function automatic void ref_round_keys(input logic [255:0] key, input int n,
                                         input int b, input int nr,
                                         output half_t rk [256]);
    half_t kl [256];
    half_t kr [256];
    half_t t;
    int h = nr / 2;        // floor(nr/2)
    int hc = (nr + 1) / 2; // ceil(nr/2)
    kl[0] = mask_half(half_t'(key >> (n/2)), n);
    kr[0] = mask_half(half_t'(key), n);
    for (int i = 1; i <= h; i++) begin
      kl[i] = kl[i-1]; kr[i] = kr[i-1];
      ref_fk(kl[i], kr[i], i, n, b);
    end
    t = kl[h]; kl[h] = kr[h]; kr[h] = t;
    for (int i = hc; i <= nr - 1; i++) begin
      kl[i] = kl[i-1]; kr[i] = kr[i-1];
      ref_fk(kl[i], kr[i], nr - i, n, b);
    end
    for (int i = 1; i <= nr; i++)
      rk[i] = (i <= hc) ? kr[i-1] : kl[i-1];
  endfunction

  function automatic logic [255:0] ref_encrypt(logic [255:0] p, logic [255:0] key,
                                               int n, int b, int nr);
    half_t rk [256];
    half_t l, r;
    ref_round_keys(key, n, b, nr, rk);
    l = mask_half(half_t'(p >> (n/2)), n);
    r = mask_half(half_t'(p), n);
    for (int i = 1; i <= nr; i++) ref_fe(l, r, rk[i], n, b);
    return (256'(r) << (n/2)) | 256'(l);
  endfunction

  function automatic logic [255:0] ref_decrypt(logic [255:0] c, logic [255:0] key,
                                               int n, int b, int nr);
    half_t rk [256];
    half_t l, r;
    ref_round_keys(key, n, b, nr, rk);
    l = mask_half(half_t'(c >> (n/2)), n);
    r = mask_half(half_t'(c), n);
    for (int i = 1; i <= nr; i++) ref_fd(l, r, rk[nr + 1 - i], n, b);
    return (256'(r) << (n/2)) | 256'(l);
  endfunction

  function automatic logic [255:0] rand256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom();
    return v;
  endfunction

endpackage
