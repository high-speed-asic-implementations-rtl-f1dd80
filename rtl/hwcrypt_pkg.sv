// hwcrypt_pkg: types, constants and pure functions shared by the HWCRYPT
// leakage-resilient crypto accelerator.
//
// Contents:
//  * TCDM (tightly coupled data memory) port structs: a 32-bit word port with
//    a request/grant handshake and a read response one or more cycles later.
//  * The job configuration that the command queue stores, with its operating
//    mode enum.
//  * AES-128 helpers (S-box computed from the GF(2^8) inverse and the affine
//    map, ShiftRows, MixColumns, one key-expansion step, one round).
//  * GF(2^8) multiplication used by the polynomial re-keying.
//  * Keccak-f[400] helpers: one round, the round constants produced by the
//    Keccak LFSR, and the rho offsets produced by the (t+1)(t+2)/2 rule.
//
// Everything here is combinational; the functions elaborate to plain logic.
// AES-128 and Keccak-f[400] follow their standard definitions; the GF(2^8)
// reduction polynomial for re-keying is the AES one (this design's choice).
package hwcrypt_pkg;

  // ------------------------------------------------------------------
  // TCDM port
  // ------------------------------------------------------------------
  typedef struct packed {
    logic        req;    // request valid
    logic [31:0] add;    // byte address (word aligned)
    logic        we;     // 1 = write, 0 = read
    logic [3:0]  be;     // byte enables
    logic [31:0] wdata;  // write data
  } tcdm_req_t;

  typedef struct packed {
    logic        gnt;     // request accepted this cycle
    logic        r_valid; // read data valid (in request order)
    logic [31:0] r_data;  // read data
  } tcdm_rsp_t;

  // ------------------------------------------------------------------
  // Jobs
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {
    MODE_PRG       = 3'd0,  // 2PRG leakage-resilient stream cipher
    MODE_AES_ROUND = 3'd1,  // direct access to one AES round per block
    MODE_POLY_RK   = 3'd2,  // polynomial re-keying only, session key to memory
    MODE_ISAP_ENC  = 3'd3,  // ISAP encryption (ISAPRK + keystream)
    MODE_ISAP_MAC  = 3'd4,  // ISAP MAC over a ciphertext, tag to memory
    MODE_ISAP_RK   = 3'd5,  // ISAPRK only, first 128 state bits to memory
    MODE_KECCAK    = 3'd6   // direct access to the Keccak-p[400] permutation
  } mode_e;

  typedef struct packed {
    mode_e        mode;
    logic [31:0]  src;          // source byte address
    logic [31:0]  dst;          // destination byte address
    logic [15:0]  nblocks;      // number of 128-bit blocks
    logic [127:0] key;          // master key
    logic [127:0] nonce;        // nonce n (128 bits)
    logic [15:0]  nonce_ext;    // 16 more nonce bits for 144-bit ISAPRK input
    logic [2:0]   mask_order;   // d, number of extra additive shares
    logic         shuffle_en;   // shuffle partial products
    logic         postproc_en;  // feed-forward + AES post-processing
    logic         rekey_en;     // 2PRG: derive K0* with the re-keying unit
    logic         irq_job_en;   // raise an event when this job finishes
    logic [4:0]   s_k;          // ISAP rounds: re-keying init/final
    logic [4:0]   s_b;          // ISAP rounds: re-keying per absorbed chunk
    logic [4:0]   s_e;          // ISAP rounds: encryption
    logic [4:0]   s_h;          // ISAP rounds: MAC
    logic [2:0]   rk_rate_log;  // log2 of re-keying absorb rate (bits)
    logic [2:0]   data_rate_log;// log2 of data rate (bits), max 7 = 128
    logic [7:0]   rk_bits;      // number of Y bits absorbed by ISAPRK (<=144)
  } job_cfg_t;

  // ------------------------------------------------------------------
  // AES-128
  // ------------------------------------------------------------------
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // GF(2^8) multiply modulo x^8+x^4+x^3+x+1
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0)
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 1; i < 8; i++) begin  // exponent 254 = bits 1..7 set
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b, s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // Byte i of a 128-bit AES block is bits [127-8i -: 8]; column c holds
  // bytes 4c..4c+3 (FIPS-197 ordering).
  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = sbox(s[127-8*i -: 8]);
    return r;
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127-8*(4*c+row) -: 8] = s[127-8*(4*((c+row)%4)+row) -: 8];
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127-32*c -: 8];
      a1 = s[119-32*c -: 8];
      a2 = s[111-32*c -: 8];
      a3 = s[103-32*c -: 8];
      r[127-32*c -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      r[119-32*c -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      r[111-32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      r[103-32*c -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  // One AES round; the final round omits MixColumns.
  function automatic logic [127:0] aes_round(input logic [127:0] s,
                                             input logic [127:0] rk,
                                             input logic         last);
    logic [127:0] t;
    t = shift_rows(sub_bytes(s));
    if (!last) t = mix_columns(t);
    return t ^ rk;
  endfunction

  // Round constant for key-expansion step i (1..10)
  function automatic logic [7:0] aes_rcon(input logic [3:0] i);
    logic [7:0] r;
    r = 8'h01;
    for (int k = 1; k < 10; k++) if (k < int'(i)) r = xtime(r);
    return r;
  endfunction

  // Round key i from round key i-1
  function automatic logic [127:0] key_step(input logic [127:0] k, input logic [3:0] i);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96]; w1 = k[95:64]; w2 = k[63:32]; w3 = k[31:0];
    t  = {sbox(w3[23:16]), sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    t[31:24] ^= aes_rcon(i);
    w0 ^= t;
    w1 ^= w0;
    w2 ^= w1;
    w3 ^= w2;
    return {w0, w1, w2, w3};
  endfunction

  // ------------------------------------------------------------------
  // Keccak-f[400]: 25 lanes of 16 bits, lane index x+5y. The flat 400-bit
  // state holds lane l at bits [399-16l -: 16], so the "first" bits of the
  // state (the sponge rate) are its most significant bits.
  // ------------------------------------------------------------------

  function automatic logic [15:0] rol16(input logic [15:0] v, input int n);
    int m;
    m = n % 16;
    return (m == 0) ? v : ((v << m) | (v >> (16 - m)));
  endfunction

  // Keccak LFSR bit rc(t), polynomial x^8+x^6+x^5+x^4+1
  function automatic logic keccak_rc_bit(input int t);
    logic [7:0] r;
    logic fb;
    r = 8'h01;
    for (int i = 0; i < 255; i++) begin
      if (i < t % 255) begin
        fb = r[7];
        r = {r[6:0], 1'b0};
        if (fb) r ^= 8'h71;
      end
    end
    return r[0];
  endfunction

  // Round constant of round ir (0..19), truncated to 16-bit lanes
  function automatic logic [15:0] keccak_rc(input int ir);
    logic [15:0] rc;
    rc = '0;
    for (int j = 0; j <= 4; j++) rc[(1 << j) - 1] = keccak_rc_bit(j + 7*ir);
    return rc;
  endfunction

  // rho offset of lane (x,y), from the walk (x,y) <- (y, 2x+3y)
  function automatic int keccak_rho(input int x, input int y);
    int cx, cy, nx, off;
    cx = 1; cy = 0; off = 0;
    if (x == 0 && y == 0) return 0;
    for (int t = 0; t < 24; t++) begin
      if (cx == x && cy == y) off = ((t+1)*(t+2)/2) % 16;
      nx = cy;
      cy = (2*cx + 3*cy) % 5;
      cx = nx;
    end
    return off;
  endfunction

  function automatic logic [399:0] keccak_round(input logic [399:0] s, input int ir);
    logic [15:0] a [25];
    logic [15:0] b [25];
    logic [15:0] c [5];
    logic [15:0] d [5];
    logic [399:0] r;
    for (int l = 0; l < 25; l++) a[l] = s[399-16*l -: 16];
    // theta
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rol16(c[(x+1)%5], 1);
    for (int l = 0; l < 25; l++) a[l] ^= d[l%5];
    // rho and pi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rol16(a[x + 5*y], keccak_rho(x, y));
    // chi
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    a[0] ^= keccak_rc(ir);
    for (int l = 0; l < 25; l++) r[399-16*l -: 16] = a[l];
    return r;
  endfunction

endpackage
