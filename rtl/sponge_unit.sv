// sponge_unit: the Sponge Unit of HWCRYPT, an ISAP engine on Keccak-p[400].
//
// The unit owns one keccak_f400 core (three rounds per cycle) and a
// sequencer that runs the ISAP operations on it. Every stage has its own
// round count (s_k, s_b, s_e, s_h, 1..20) and the two rates, for re-keying
// (r_b) and for data (r_e = r_h), are 2^k bits for k = 0..7 (1 to 128 bits).
// The state's first bits (its rate part) are its most significant bits;
// a 128-bit data block enters from its most significant bit.
//
//  IV(id) = id, 128, r_h, r_b, s_h, s_b, s_e, s_k as bytes, then zeros
//          (272 bits); id = 1 for the MAC (IV_MAC), 2 for the MAC re-keying
//          (IV_RK), 3 for the encryption re-keying (IV_ENC).
//  ISAPRK(K, IV, Y): S = K||IV, p^s_k; absorb Y (its first rk_bits bits) r_b
//          bits at a time, with p^s_b after each chunk but the last and
//          p^s_k after the last.
//  MODE_ISAP_ENC: K_E = first 272 bits of ISAPRK(K, IV_ENC, N); S = K_E||N;
//          per r_e-bit chunk of data: p^s_e, then out = in ^ S[first r_e].
//  MODE_ISAP_MAC: S = N||IV_MAC, p^s_h; absorb the padding of the empty
//          associated data (a single 1 bit), p^s_h; flip the last state bit
//          (domain separation); absorb the nblocks input blocks r_h bits at a
//          time, then the padding chunk, each followed by p^s_h;
//          y = first 144 bits; K_A = first 128 bits of ISAPRK(K, IV_RK, y);
//          S = K_A || last 272 bits of S before the re-keying; p^s_h;
//          tag = first 128 bits, written out as one block.
//  MODE_ISAP_RK: ISAPRK(K, IV_RK, {N, nonce_ext}), first 128 bits out.
//  MODE_KECCAK: low-level access; reads 4 blocks (the first 400 of their
//          512 bits are the state), applies p^s_h, writes 4 blocks.
//
// Timing. A permutation of s rounds takes ceil(s/3) cycles; absorbing a
// chunk costs one more cycle, in which the chunk is XORed in and the next
// permutation starts. ISAPRK with a 144-bit Y, r_b = 1 and 12 rounds thus
// needs about 5 cycles per Y bit. Encryption at r_e = 128 and s_e = 12
// produces one block every 5 cycles when the streams do not stall.
//
// Interface: start_i with the job fields, valid/ready block streams in_*
// and out_* (output register after the XOR), done_o pulses when the last
// output block has been taken.
//
// The document fixes Keccak-f[400], three rounds per cycle, the 20-round
// limit, per-stage rates (1 to 128 bits, powers of two) and round counts,
// the 128-bit data rate, the three IV inputs and the modes ISAPRK, ISAPENC
// and ISAPMAC plus low-level access. The ISAP sequences above, the IV
// layout, the bit order and the empty associated data follow the published
// ISAP construction as this design reads it, not a text it was checked
// against.
module sponge_unit
  import hwcrypt_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  mode_e        mode_i,
  input  logic [127:0] key_i,
  input  logic [127:0] nonce_i,
  input  logic [15:0]  nonce_ext_i,
  input  logic [15:0]  nblocks_i,
  input  logic [4:0]   s_k_i,
  input  logic [4:0]   s_b_i,
  input  logic [4:0]   s_e_i,
  input  logic [4:0]   s_h_i,
  input  logic [2:0]   rk_rate_log_i,
  input  logic [2:0]   data_rate_log_i,
  input  logic [7:0]   rk_bits_i,
  output logic         busy_o,
  output logic         done_o,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  logic [127:0] in_data_i,
  output logic         out_valid_o,
  input  logic         out_ready_i,
  output logic [127:0] out_data_o
);

  typedef enum logic [3:0] {
    S_IDLE, S_RK_ABS, S_RK_END, S_ENC, S_MAC_PAD_AD, S_MAC_DSEP, S_MAC_ABS,
    S_MAC_PAD, S_MAC_Y, S_MAC_TAG, S_OUT_ONE, S_K_IN, S_K_PERM, S_K_OUT, S_FLUSH
  } state_e;

  state_e       state_q;
  mode_e        mode_q;
  logic [127:0] key_q, nonce_q, blk_q, ks_q;
  logic [143:0] y_q;
  logic [271:0] sav_q;
  logic [511:0] kbuf_q;
  logic [15:0]  left_q;
  logic [7:0]   c_q;          // chunk index
  logic [4:0]   s_k_q, s_b_q, s_e_q, s_h_q;
  logic [2:0]   rbl_q, rdl_q;
  logic [7:0]   rk_bits_q;
  logic         out_valid_q;
  logic [127:0] out_q;

  // keccak core
  logic         k_load, k_start, k_busy, k_done;
  logic [399:0] k_in, st;
  logic [4:0]   k_nr;

  keccak_f400 u_keccak (
    .clk_i, .rst_ni,
    .load_i (k_load), .state_i (k_in),
    .start_i(k_start), .nrounds_i(k_nr),
    .busy_o (k_busy), .done_o (k_done),
    .state_o(st)
  );

  // ------------------------------------------------------------------
  // rate helpers
  // ------------------------------------------------------------------
  logic [8:0]   rb, rd;              // rates in bits
  logic [127:0] dmask;               // first rd bits of a 128-bit block
  logic [143:0] bmask;               // first rb bits of a 144-bit vector
  logic [7:0]   d_nch;               // data chunks per block
  logic [7:0]   rk_nch;              // chunks of Y
  always_comb begin
    rb     = 9'd1 << rbl_q;
    rd     = 9'd1 << rdl_q;
    dmask  = ~({128{1'b1}} >> rd);
    bmask  = ~({144{1'b1}} >> rb);
    d_nch  = 8'(9'd128 >> rdl_q);
    rk_nch = 8'((9'(rk_bits_q) + rb - 9'd1) >> rbl_q);
  end

  function automatic logic [271:0] make_iv(input logic [7:0] id,
                                          input logic [8:0] rdb, input logic [8:0] rbb,
                                          input logic [4:0] sh, input logic [4:0] sb,
                                          input logic [4:0] se, input logic [4:0] sk);
    return {id, 8'd128, rdb[7:0] | {rdb[8], 7'd0}, rbb[7:0] | {rbb[8], 7'd0},
            3'd0, sh, 3'd0, sb, 3'd0, se, 3'd0, sk, 208'd0};
  endfunction

  logic [271:0] iv_rk;
  assign iv_rk  = make_iv(8'd2, rd, rb, s_h_q, s_b_q, s_e_q, s_k_q);

  // current Y chunk and data chunk aligned to the top of the state
  logic [143:0] y_chunk;
  logic [127:0] cur_blk, d_chunk, ks_next;
  logic         rk_last, d_last;
  always_comb begin
    y_chunk = (y_q << (32'(c_q) << rbl_q)) & bmask;
    cur_blk = (c_q == 8'd0) ? in_data_i : blk_q;
    d_chunk = (cur_blk << (32'(c_q) << rdl_q)) & dmask;
    ks_next = ((c_q == 8'd0) ? '0 : ks_q) | ((st[399:272] & dmask) >> (32'(c_q) << rdl_q));
    rk_last = (c_q == rk_nch - 8'd1);
    d_last  = (c_q == d_nch - 8'd1);
  end

  logic out_free;
  assign out_free = !out_valid_q || out_ready_i;

  // firing conditions of the stream-facing states
  logic enc_fire, abs_fire, kin_fire;
  assign enc_fire = (state_q == S_ENC) && !k_busy && (c_q != 8'd0 || in_valid_i)
                    && (!d_last || out_free);
  assign abs_fire = (state_q == S_MAC_ABS) && !k_busy && (c_q != 8'd0 || in_valid_i);
  assign kin_fire = (state_q == S_K_IN) && in_valid_i;

  assign in_ready_o  = ((enc_fire || abs_fire) && c_q == 8'd0) || kin_fire;
  assign out_valid_o = out_valid_q;
  assign out_data_o  = out_q;
  assign busy_o      = (state_q != S_IDLE);

  // masked Y: only its first rk_bits bits are used
  function automatic logic [143:0] ymask(input logic [143:0] y, input logic [7:0] n);
    return y & ~({144{1'b1}} >> n);
  endfunction

  // keccak control (combinational, from the sequencer state)
  always_comb begin
    k_load  = 1'b0;
    k_start = 1'b0;
    k_in    = st;
    k_nr    = s_h_q;
    unique case (state_q)
      S_IDLE: begin
        if (start_i) begin
          unique case (mode_i)
            MODE_ISAP_MAC: begin
              k_load = 1'b1; k_start = 1'b1; k_nr = s_h_i;
              k_in = {nonce_i, make_iv(8'd1, 9'd1 << data_rate_log_i, 9'd1 << rk_rate_log_i,
                                       s_h_i, s_b_i, s_e_i, s_k_i)};
            end
            MODE_ISAP_ENC: begin
              k_load = 1'b1; k_start = 1'b1; k_nr = s_k_i;
              k_in = {key_i, make_iv(8'd3, 9'd1 << data_rate_log_i, 9'd1 << rk_rate_log_i,
                                     s_h_i, s_b_i, s_e_i, s_k_i)};
            end
            MODE_ISAP_RK: begin
              k_load = 1'b1; k_start = 1'b1; k_nr = s_k_i;
              k_in = {key_i, make_iv(8'd2, 9'd1 << data_rate_log_i, 9'd1 << rk_rate_log_i,
                                     s_h_i, s_b_i, s_e_i, s_k_i)};
            end
            default: ;
          endcase
        end
      end
      S_RK_ABS: if (!k_busy) begin
        k_load = 1'b1; k_start = 1'b1;
        k_in   = st ^ {y_chunk, 256'd0};
        k_nr   = rk_last ? s_k_q : s_b_q;
      end
      S_RK_END: if (!k_busy) begin
        if (mode_q == MODE_ISAP_ENC) begin
          k_load = 1'b1; k_start = 1'b1; k_nr = s_e_q;
          k_in   = {st[399:128], nonce_q};
        end else if (mode_q == MODE_ISAP_MAC) begin
          k_load = 1'b1; k_start = 1'b1; k_nr = s_h_q;
          k_in   = {st[399:272], sav_q};
        end
      end
      S_ENC: if (enc_fire && !(d_last && left_q == 16'd1)) begin
        k_start = 1'b1; k_nr = s_e_q;
      end
      S_MAC_PAD_AD, S_MAC_PAD: if (!k_busy) begin
        k_load = 1'b1; k_start = 1'b1; k_nr = s_h_q;
        k_in   = st ^ {1'b1, 399'd0};
      end
      S_MAC_DSEP: if (!k_busy) begin
        k_load = 1'b1;
        k_in   = st ^ 400'd1;
      end
      S_MAC_ABS: if (abs_fire) begin
        k_load = 1'b1; k_start = 1'b1; k_nr = s_h_q;
        k_in   = st ^ {d_chunk, 272'd0};
      end
      S_MAC_Y: if (!k_busy) begin
        k_load = 1'b1; k_start = 1'b1; k_nr = s_k_q;
        k_in   = {key_q, iv_rk};
      end
      S_K_PERM: begin
        k_load = 1'b1; k_start = 1'b1; k_nr = s_h_q;
        k_in   = kbuf_q[511:112];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      mode_q      <= MODE_ISAP_ENC;
      key_q       <= '0;
      nonce_q     <= '0;
      blk_q       <= '0;
      ks_q        <= '0;
      y_q         <= '0;
      sav_q       <= '0;
      kbuf_q      <= '0;
      left_q      <= '0;
      c_q         <= '0;
      s_k_q       <= '0;
      s_b_q       <= '0;
      s_e_q       <= '0;
      s_h_q       <= '0;
      rbl_q       <= '0;
      rdl_q       <= '0;
      rk_bits_q   <= '0;
      out_valid_q <= 1'b0;
      out_q       <= '0;
      done_o      <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (out_valid_q && out_ready_i) out_valid_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start_i) begin
            mode_q    <= mode_i;
            key_q     <= key_i;
            nonce_q   <= nonce_i;
            left_q    <= nblocks_i;
            s_k_q     <= s_k_i;
            s_b_q     <= s_b_i;
            s_e_q     <= s_e_i;
            s_h_q     <= s_h_i;
            rbl_q     <= rk_rate_log_i;
            rdl_q     <= data_rate_log_i;
            rk_bits_q <= (rk_bits_i > 8'd144) ? 8'd144 : rk_bits_i;
            c_q       <= '0;
            unique case (mode_i)
              MODE_ISAP_ENC: begin
                y_q     <= ymask({nonce_i, 16'd0}, rk_bits_i);
                state_q <= S_RK_ABS;
              end
              MODE_ISAP_RK: begin
                y_q     <= ymask({nonce_i, nonce_ext_i}, rk_bits_i);
                state_q <= S_RK_ABS;
              end
              MODE_ISAP_MAC: state_q <= S_MAC_PAD_AD;
              MODE_KECCAK:   state_q <= S_K_IN;
              default: ;
            endcase
          end
        end
        // ---------------- ISAPRK ----------------
        S_RK_ABS: if (!k_busy) begin
          c_q <= c_q + 8'd1;
          if (rk_last) state_q <= S_RK_END;
        end
        S_RK_END: if (!k_busy) begin
          c_q <= '0;
          unique case (mode_q)
            MODE_ISAP_ENC: state_q <= (left_q == 16'd0) ? S_FLUSH : S_ENC;
            MODE_ISAP_MAC: state_q <= S_MAC_TAG;
            default: begin
              out_q   <= st[399:272];
              state_q <= S_OUT_ONE;
            end
          endcase
        end
        // ---------------- ISAPENC ----------------
        S_ENC: if (enc_fire) begin
          blk_q <= cur_blk;
          ks_q  <= ks_next;
          if (d_last) begin
            out_q       <= cur_blk ^ ks_next;
            out_valid_q <= 1'b1;
            c_q         <= '0;
            left_q      <= left_q - 16'd1;
            if (left_q == 16'd1) state_q <= S_FLUSH;
          end else begin
            c_q <= c_q + 8'd1;
          end
        end
        // ---------------- ISAPMAC ----------------
        S_MAC_PAD_AD: if (!k_busy) state_q <= S_MAC_DSEP;
        S_MAC_DSEP:   if (!k_busy) state_q <= (left_q == 16'd0) ? S_MAC_PAD : S_MAC_ABS;
        S_MAC_ABS: if (abs_fire) begin
          blk_q <= cur_blk;
          if (d_last) begin
            c_q    <= '0;
            left_q <= left_q - 16'd1;
            if (left_q == 16'd1) state_q <= S_MAC_PAD;
          end else begin
            c_q <= c_q + 8'd1;
          end
        end
        S_MAC_PAD: if (!k_busy) state_q <= S_MAC_Y;
        S_MAC_Y: if (!k_busy) begin
          y_q     <= ymask(st[399:256], rk_bits_q);
          sav_q   <= st[271:0];
          c_q     <= '0;
          state_q <= S_RK_ABS;
        end
        S_MAC_TAG: if (!k_busy) begin
          out_q   <= st[399:272];
          state_q <= S_OUT_ONE;
        end
        S_OUT_ONE: if (out_free) begin
          out_valid_q <= 1'b1;
          state_q     <= S_FLUSH;
        end
        // ---------------- low-level permutation ----------------
        S_K_IN: if (kin_fire) begin
          kbuf_q <= {kbuf_q[383:0], in_data_i};
          c_q    <= c_q + 8'd1;
          if (c_q == 8'd3) state_q <= S_K_PERM;
        end
        S_K_PERM: begin
          c_q     <= '0;
          state_q <= S_K_OUT;
        end
        S_K_OUT: if (!k_busy && out_free) begin
          out_q       <= (c_q == 8'd0) ? st[399:272] :
                         (c_q == 8'd1) ? st[271:144] :
                         (c_q == 8'd2) ? st[143:16]  : {st[15:0], 112'd0};
          out_valid_q <= 1'b1;
          c_q         <= c_q + 8'd1;
          if (c_q == 8'd3) state_q <= S_FLUSH;
        end
        S_FLUSH: if (out_free) begin
          done_o  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // the core is never restarted while it runs
  assert property (@(posedge clk_i) disable iff (!rst_ni) k_start |-> !k_busy);

  // k_done is not needed by the sequencer, which watches k_busy
  logic unused;
  assign unused = k_done;

endmodule
