// tb_ref_pkg: reference models for the HWCRYPT testbenches, written
// independently of the RTL package.
//
//  * AES-128 on a byte array, with the S-box built from log/antilog tables
//    of the generator 3 (the RTL uses a^254 and the affine map).
//  * 2PRG stream: K_{i+1} = AES_K(C_A), c_i = p_i ^ AES_K(C_B).
//  * Product in GF(2^8)[y]/(y^16+1) as a plain convolution.
//  * Keccak-p[400] from the standard rho-offset and round-constant tables.
//  * ISAPRK, ISAP encryption and ISAP MAC with the same conventions as the
//    sponge unit (rate = most significant state bits, IV layout, empty
//    associated data), written as straight-line software.
// init() must be called once before the AES functions are used.
package tb_ref_pkg;

  byte unsigned sb [256];

  function automatic byte unsigned mul2(byte unsigned a);
    return byte'((a << 1) ^ ((a & 8'h80) != 0 ? 8'h1b : 8'h00));
  endfunction

  // GF(2^8) product by shift-and-add over the bits of a
  function automatic byte unsigned gmul(byte unsigned a, byte unsigned b);
    byte unsigned r;
    r = 0;
    for (int i = 7; i >= 0; i--) begin
      r = mul2(r);
      if (a[i]) r ^= b;
    end
    return r;
  endfunction

  function automatic void init();
    byte unsigned lg [256];
    byte unsigned alg [256];
    byte unsigned x, inv, s;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      alg[i] = x;
      lg[x]  = byte'(i);
      x = x ^ mul2(x);            // times 3
    end
    for (int v = 0; v < 256; v++) begin
      inv = (v == 0) ? 8'd0 : alg[(255 - lg[v]) % 255];
      s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
              ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      sb[v] = s;
    end
  endfunction

  function automatic logic [127:0] aes128(logic [127:0] key, logic [127:0] pt);
    byte unsigned st [16];
    byte unsigned t [16];
    byte unsigned w [176];
    byte unsigned tmp [4];
    byte unsigned rc, a0, a1, a2, a3;
    logic [127:0] r;
    for (int i = 0; i < 16; i++) begin
      w[i]  = key[127-8*i -: 8];
      st[i] = pt[127-8*i -: 8];
    end
    rc = 1;
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[i-4+j];
      if (i % 16 == 0) begin
        a0 = tmp[0];
        tmp[0] = sb[tmp[1]] ^ rc;
        tmp[1] = sb[tmp[2]];
        tmp[2] = sb[tmp[3]];
        tmp[3] = sb[a0];
        rc = mul2(rc);
      end
      for (int j = 0; j < 4; j++) w[i+j] = w[i-16+j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) st[i] ^= w[i];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int i = 0; i < 16; i++) t[i] = sb[st[(i + 4*(i%4)) % 16]];   // sub + shift
      if (rnd != 10)
        for (int c = 0; c < 4; c++) begin
          a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
          t[4*c]   = gmul(2,a0) ^ gmul(3,a1) ^ a2 ^ a3;
          t[4*c+1] = a0 ^ gmul(2,a1) ^ gmul(3,a2) ^ a3;
          t[4*c+2] = a0 ^ a1 ^ gmul(2,a2) ^ gmul(3,a3);
          t[4*c+3] = gmul(3,a0) ^ a1 ^ a2 ^ gmul(2,a3);
        end
      for (int i = 0; i < 16; i++) st[i] = t[i] ^ w[16*rnd + i];
    end
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = st[i];
    return r;
  endfunction

  // one full AES round (with MixColumns) under a given round key
  function automatic logic [127:0] aes_one_round(logic [127:0] s, logic [127:0] rk);
    byte unsigned st [16];
    byte unsigned t [16];
    byte unsigned a0, a1, a2, a3;
    logic [127:0] r;
    for (int i = 0; i < 16; i++) st[i] = s[127-8*i -: 8];
    for (int i = 0; i < 16; i++) t[i] = sb[st[(i + 4*(i%4)) % 16]];
    for (int c = 0; c < 4; c++) begin
      a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
      t[4*c]   = gmul(2,a0) ^ gmul(3,a1) ^ a2 ^ a3;
      t[4*c+1] = a0 ^ gmul(2,a1) ^ gmul(3,a2) ^ a3;
      t[4*c+2] = a0 ^ a1 ^ gmul(2,a2) ^ gmul(3,a3);
      t[4*c+3] = gmul(3,a0) ^ a1 ^ a2 ^ gmul(2,a3);
    end
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = t[i];
    return r ^ rk;
  endfunction

  // K . n in GF(2^8)[y]/(y^16+1), byte i = coefficient of y^i
  function automatic logic [127:0] polymul(logic [127:0] a, logic [127:0] b);
    byte unsigned c [16];
    logic [127:0] r;
    for (int k = 0; k < 16; k++) c[k] = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        c[(i+j) % 16] ^= gmul(a[127-8*i -: 8], b[127-8*j -: 8]);
    for (int k = 0; k < 16; k++) r[127-8*k -: 8] = c[k];
    return r;
  endfunction

  // ---------------- Keccak-p[400] ----------------
  localparam int RHO [25] = '{0, 1, 62, 28, 27, 36, 44, 6, 55, 20, 3, 10, 43, 25,
                              39, 41, 45, 15, 21, 8, 18, 2, 61, 56, 14};
  localparam logic [15:0] RC [20] = '{16'h0001, 16'h8082, 16'h808A, 16'h8000, 16'h808B,
                                      16'h0001, 16'h8081, 16'h8009, 16'h008A, 16'h0088,
                                      16'h8009, 16'h000A, 16'h808B, 16'h008B, 16'h8089,
                                      16'h8003, 16'h8002, 16'h0080, 16'h800A, 16'h000A};

  function automatic logic [15:0] rot(logic [15:0] v, int n);
    logic [31:0] d;
    d = {v, v} << (n % 16);
    return d[31:16];
  endfunction

  function automatic logic [399:0] keccak_p400(logic [399:0] s, int nr);
    logic [15:0] A [5][5];
    logic [15:0] B [5][5];
    logic [15:0] C [5];
    logic [15:0] D [5];
    logic [399:0] r;
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++) A[x][y] = s[399-16*(x+5*y) -: 16];
    for (int ir = 20 - nr; ir < 20; ir++) begin
      for (int x = 0; x < 5; x++) C[x] = A[x][0] ^ A[x][1] ^ A[x][2] ^ A[x][3] ^ A[x][4];
      for (int x = 0; x < 5; x++) D[x] = C[(x+4)%5] ^ rot(C[(x+1)%5], 1);
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) A[x][y] ^= D[x];
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) B[y][(2*x+3*y)%5] = rot(A[x][y], RHO[x+5*y]);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) A[x][y] = B[x][y] ^ (~B[(x+1)%5][y] & B[(x+2)%5][y]);
      A[0][0] ^= RC[ir];
    end
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++) r[399-16*(x+5*y) -: 16] = A[x][y];
    return r;
  endfunction

  // ---------------- ISAP ----------------
  typedef struct {
    int sk, sb, se, sh;
    int rb, rd;       // rates in bits
    int ybits;        // ISAPRK input bits
  } isap_cfg_t;

  function automatic logic [271:0] iv(int id, isap_cfg_t c);
    logic [63:0] h;
    h = {8'(id), 8'd128, 8'(c.rd), 8'(c.rb), 8'(c.sh), 8'(c.sb), 8'(c.se), 8'(c.sk)};
    return {h, 208'd0};
  endfunction

  // XOR bits [from, from+len) of a value, counted from its MSB, into the
  // first len bits of the state
  function automatic logic [399:0] isap_rk(logic [127:0] k, int id, logic [143:0] y,
                                           isap_cfg_t c);
    logic [399:0] s;
    int nch;
    s = keccak_p400({k, iv(id, c)}, c.sk);
    nch = (c.ybits + c.rb - 1) / c.rb;
    for (int ch = 0; ch < nch; ch++) begin
      for (int b = 0; b < c.rb; b++) begin
        int pos;
        pos = ch*c.rb + b;
        if (pos < c.ybits) s[399-b] ^= y[143-pos];
      end
      s = keccak_p400(s, (ch == nch-1) ? c.sk : c.sb);
    end
    return s;
  endfunction

  function automatic void isap_enc(logic [127:0] k, logic [127:0] n, isap_cfg_t c,
                                   ref logic [127:0] data [], output logic [127:0] res []);
    logic [399:0] s;
    logic [127:0] o;
    s = isap_rk(k, 3, {n, 16'd0}, c);
    s = {s[399:128], n};
    res = new[data.size()];
    foreach (data[i]) begin
      o = data[i];
      for (int ch = 0; ch < 128 / c.rd; ch++) begin
        s = keccak_p400(s, c.se);
        for (int b = 0; b < c.rd; b++) o[127 - ch*c.rd - b] ^= s[399-b];
      end
      res[i] = o;
    end
  endfunction

  function automatic logic [127:0] isap_mac(logic [127:0] k, logic [127:0] n, isap_cfg_t c,
                                            ref logic [127:0] data []);
    logic [399:0] s, r;
    s = keccak_p400({n, iv(1, c)}, c.sh);
    s[399] ^= 1'b1;                       // padding of the empty associated data
    s = keccak_p400(s, c.sh);
    s[0] ^= 1'b1;                         // domain separation
    foreach (data[i])
      for (int ch = 0; ch < 128 / c.rd; ch++) begin
        for (int b = 0; b < c.rd; b++) s[399-b] ^= data[i][127 - ch*c.rd - b];
        s = keccak_p400(s, c.sh);
      end
    s[399] ^= 1'b1;                       // padding of the message
    s = keccak_p400(s, c.sh);
    r = isap_rk(k, 2, s[399:256], c);
    s = keccak_p400({r[399:272], s[271:0]}, c.sh);
    return s[399:272];
  endfunction

endpackage
