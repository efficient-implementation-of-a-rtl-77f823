// sea_ref_pkg: reference model of SEA(n,b) for the testbenches.
//
// sea_model#(N, B, NR) computes the cipher word by word, the way the cipher
// is specified, without sharing code with the RTL: the S-box is a 3-bit
// lookup table applied to each bit column of a word triple, the key schedule
// is computed in full into arrays (KL_i, KR_i for i = 0..NR) with the switch
// at floor(NR/2), and decryption undoes the encryption rounds one by one in
// reverse order. Static functions only; nothing is synthesized from it.
package sea_ref_pkg;

  class sea_model #(int N = 48, int B = 8, int NR = 51);
    localparam int NB = N / (2 * B);
    localparam int W  = N / 2;
    localparam int M  = NR / 2;
    typedef logic [W-1:0] half_t;
    typedef logic [N-1:0] blk_t;

    static function logic [B-1:0] wd(half_t x, int i);
      return x[i*B +: B];
    endfunction

    static function half_t sbox(half_t x);
      logic [2:0] tbl [8] = '{3'd0, 3'd5, 3'd6, 3'd7, 3'd4, 3'd3, 3'd1, 3'd2};
      half_t y;
      y = x;
      for (int g = 0; g < NB / 3; g++)
        for (int j = 0; j < B; j++) begin
          logic [2:0] v;
          v = {x[(3*g+2)*B + j], x[(3*g+1)*B + j], x[(3*g)*B + j]};
          v = tbl[v];
          y[(3*g)*B + j]   = v[0];
          y[(3*g+1)*B + j] = v[1];
          y[(3*g+2)*B + j] = v[2];
        end
      return y;
    endfunction

    static function logic [B-1:0] rotr1(logic [B-1:0] w);
      return (w >> 1) | (w << (B - 1));
    endfunction

    static function logic [B-1:0] rotl1(logic [B-1:0] w);
      return (w << 1) | (w >> (B - 1));
    endfunction

    static function half_t bitrot(half_t x);
      half_t y;
      for (int i = 0; i < NB; i++) begin
        case (i % 3)
          0: y[i*B +: B] = rotr1(wd(x, i));
          1: y[i*B +: B] = wd(x, i);
          default: y[i*B +: B] = rotl1(wd(x, i));
        endcase
      end
      return y;
    endfunction

    static function half_t wordrot(half_t x);
      half_t y;
      for (int i = 0; i < NB; i++) y[((i + 1) % NB)*B +: B] = wd(x, i);
      return y;
    endfunction

    static function half_t wordrot_inv(half_t x);
      half_t y;
      for (int i = 0; i < NB; i++) y[i*B +: B] = wd(x, (i + 1) % NB);
      return y;
    endfunction

    static function half_t add(half_t x, half_t k);
      half_t y;
      for (int i = 0; i < NB; i++) y[i*B +: B] = wd(x, i) + wd(k, i);
      return y;
    endfunction

    static function half_t cvec(int i);
      half_t c;
      c = '0;
      c[B-1:0] = B'(i);
      return c;
    endfunction

    // FE: returns {L_i, R_i}
    static function blk_t fe(half_t l, half_t r, half_t k);
      return {r, wordrot(l) ^ bitrot(sbox(add(r, k)))};
    endfunction

    // FK: returns {KL_i, KR_i}
    static function blk_t fk(half_t kl, half_t kr, half_t c);
      return {kr, kl ^ wordrot(bitrot(sbox(add(kr, c))))};
    endfunction

    // the key used by data round i (1..NR), following the pseudo-code
    static function void round_keys(blk_t key, output half_t rk [NR+1]);
      half_t kl [NR+1];
      half_t kr [NR+1];
      half_t t;
      blk_t  o;
      kl[0] = key[N-1:W];
      kr[0] = key[W-1:0];
      for (int i = 1; i <= M; i++) begin
        o = fk(kl[i-1], kr[i-1], cvec(i));
        kl[i] = o[N-1:W]; kr[i] = o[W-1:0];
      end
      t = kl[M]; kl[M] = kr[M]; kr[M] = t;
      for (int i = M + 1; i <= NR - 1; i++) begin
        o = fk(kl[i-1], kr[i-1], cvec(NR - i));
        kl[i] = o[N-1:W]; kr[i] = o[W-1:0];
      end
      rk[0] = '0;
      for (int i = 1; i <= NR; i++) rk[i] = (i <= M + 1) ? kr[i-1] : kl[i-1];
    endfunction

    static function blk_t encrypt(blk_t p, blk_t key);
      half_t rk [NR+1];
      half_t l, r;
      blk_t  o;
      round_keys(key, rk);
      l = p[N-1:W];
      r = p[W-1:0];
      for (int i = 1; i <= NR; i++) begin
        o = fe(l, r, rk[i]);
        l = o[N-1:W]; r = o[W-1:0];
      end
      return {r, l};
    endfunction

    // undo FE round by round: R_{i-1} = L_i, L_{i-1} = WordRot^-1(R_i ^ f(L_i))
    static function blk_t decrypt(blk_t c, blk_t key);
      half_t rk [NR+1];
      half_t l, r, lp;
      round_keys(key, rk);
      r = c[N-1:W];
      l = c[W-1:0];
      for (int i = NR; i >= 1; i--) begin
        lp = wordrot_inv(r ^ bitrot(sbox(add(l, rk[i]))));
        r  = l;
        l  = lp;
      end
      return {l, r};
    endfunction

    static function blk_t rand_blk();
      blk_t v;
      for (int i = 0; i < N; i += 32) v = (v << 32) | blk_t'($urandom);
      return v;
    endfunction
  endclass

endpackage
