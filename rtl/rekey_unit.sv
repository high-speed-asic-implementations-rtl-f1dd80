// rekey_unit: side-channel protected re-keying K* = K . n, a product of
// polynomials in GF(2^8)[y] / (y^16 + 1).
//
// Byte i of a 128-bit value (bits [127-8i -: 8]) is the coefficient of y^i.
// The product is formed in operand-scan order: in each multiply cycle one
// coefficient a_i of the (masked) key is multiplied by all 16 coefficients
// of the nonce with 16 GF(2^8) multipliers, and partial product
// a_i * n_j is added to accumulator (i + j) mod 16.
//
// Side-channel protection
//  * Additive masking of order d: the key is split into d+1 shares
//    (d random shares from the PRNG, the last one K xor all of them). Each
//    share is multiplied by n in turn on the single multiplier array, and
//    the products are summed. Because the product is linear in K the sum is
//    K . n.
//  * Shuffling: the order of the 16 indices i is drawn at random per share.
//    Each cycle a random start position is taken from the PRNG and the
//    first index not yet used at or after it (cyclically) is processed, so
//    every one of the 16! orders can occur. Shuffling costs no cycles.
//  * Optional post-processing: feed-forward of the master key and one AES
//    call, K_out = AES_{K*}(K) xor K, on the AES unit's single-encryption
//    port.
//
// Timing. One share takes 18 cycles (load, 16 multiply-accumulate cycles,
// sum), so a session key takes 18*(d+1) cycles from start to done without
// post-processing. Post-processing adds the AES call plus two cycles.
// The operand-scan form, the 16 multipliers, masking of configurable order,
// full shuffling, the 18*(d+1) cycle count and a post-processing step with
// a key feed-forward and an AES call follow the document; the field
// polynomial, the share generation, the shuffling rule and the exact
// post-processing formula are this design's choices.
module rekey_unit
  import hwcrypt_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic [127:0] key_i,
  input  logic [127:0] nonce_i,
  input  logic [2:0]   mask_order_i,
  input  logic         shuffle_en_i,
  input  logic         postproc_en_i,
  // randomness
  output logic         rnd_next_o,
  input  logic [127:0] rnd_i,
  // AES single encryption for post-processing
  output logic         aes_req_o,
  output logic [127:0] aes_key_o,
  output logic [127:0] aes_pt_o,
  input  logic         aes_ack_i,
  input  logic [127:0] aes_ct_i,
  // result
  output logic         busy_o,
  output logic         done_o,
  output logic [127:0] key_o
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_MUL, S_SUM, S_AES_REQ} state_e;
  state_e       state_q;
  logic [127:0] key_q, nonce_q, share_q, maskacc_q, acc_q, res_q;
  logic [2:0]   d_q, sh_q;       // masking order, current share
  logic         shuf_q, post_q;
  logic [15:0]  used_q;          // indices already processed for this share
  logic [4:0]   cnt_q;

  // Next index: in order, or the first unused index at/after a random start
  logic [3:0] idx;
  always_comb begin
    logic [3:0] start, cand;
    logic       found;
    start = shuf_q ? rnd_i[3:0] : 4'd0;
    idx   = 4'd0;
    found = 1'b0;
    for (int k = 0; k < 16; k++) begin
      cand = start + 4'(k);
      if (!found && !used_q[cand]) begin
        idx   = cand;
        found = 1'b1;
      end
    end
  end

  // 16 GF(2^8) multipliers: a_idx times every nonce coefficient, rotated
  // so that a_idx * n_j lands in accumulator (idx + j) mod 16
  logic [127:0] prod, pp;
  always_comb begin
    logic [7:0] a;
    a = share_q[127-8*idx -: 8];
    for (int j = 0; j < 16; j++)
      prod[127-8*j -: 8] = gf_mul(a, nonce_q[127-8*j -: 8]);
  end
  // rotate by idx bytes: coefficient j moves to position (idx + j) mod 16
  assign pp = (prod >> (8*idx)) | (prod << (128 - 8*idx));


  assign rnd_next_o = (state_q == S_LOAD) || (state_q == S_MUL && shuf_q);
  assign busy_o     = (state_q != S_IDLE);
  assign aes_req_o  = (state_q == S_AES_REQ);
  assign aes_key_o  = res_q;
  assign aes_pt_o   = key_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= S_IDLE;
      key_q     <= '0;
      nonce_q   <= '0;
      share_q   <= '0;
      maskacc_q <= '0;
      acc_q     <= '0;
      res_q     <= '0;
      d_q       <= '0;
      sh_q      <= '0;
      shuf_q    <= 1'b0;
      post_q    <= 1'b0;
      used_q    <= '0;
      cnt_q     <= '0;
      done_o    <= 1'b0;
      key_o     <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start_i) begin
            key_q     <= key_i;
            nonce_q   <= nonce_i;
            d_q       <= mask_order_i;
            shuf_q    <= shuffle_en_i;
            post_q    <= postproc_en_i;
            sh_q      <= '0;
            maskacc_q <= '0;
            res_q     <= '0;
            state_q   <= S_LOAD;
          end
        end
        S_LOAD: begin
          // the last share is K xor the earlier random shares
          if (sh_q == d_q) share_q <= key_q ^ maskacc_q;
          else begin
            share_q   <= rnd_i;
            maskacc_q <= maskacc_q ^ rnd_i;
          end
          acc_q   <= '0;
          used_q  <= '0;
          cnt_q   <= '0;
          state_q <= S_MUL;
        end
        S_MUL: begin
          acc_q       <= acc_q ^ pp;
          used_q[idx] <= 1'b1;
          cnt_q       <= cnt_q + 5'd1;
          if (cnt_q == 5'd15) state_q <= S_SUM;
        end
        S_SUM: begin
          res_q <= res_q ^ acc_q;
          if (sh_q == d_q) begin
            if (post_q) state_q <= S_AES_REQ;
            else begin
              key_o   <= res_q ^ acc_q;
              done_o  <= 1'b1;
              state_q <= S_IDLE;
            end
          end else begin
            sh_q    <= sh_q + 3'd1;
            state_q <= S_LOAD;
          end
        end
        S_AES_REQ: begin
          // the request is held until the AES unit answers
          if (aes_ack_i) begin
            key_o   <= aes_ct_i ^ key_q;
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // each index is processed exactly once per share
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   (state_q == S_MUL) |-> !used_q[idx]);

endmodule
