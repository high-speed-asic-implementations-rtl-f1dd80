// aes_unit: the AES Unit of HWCRYPT, two AES-128 datapaths with one shared
// round-key generator.
//
// Function
//  * MODE_PRG (leakage-resilient 2PRG stream cipher): from the session key K
//    the unit computes K' = AES_K(C_A) on datapath A and the pad
//    y = AES_K(C_B) on datapath B in parallel. Each input block p leaves as
//    p ^ y, and K' is the key of the next block, so every key encrypts only
//    the two constants.
//  * MODE_AES_ROUND: direct access to the round function. Each input block
//    s leaves as MixColumns(ShiftRows(SubBytes(s))) ^ key.
//  * ECB port: one AES-128 encryption of ecb_pt under ecb_key on datapath A,
//    used by the re-keying post-processing. Served only while idle; the
//    requester holds ecb_req until the one-cycle ecb_ack pulse.
//
// Timing. Both datapaths compute two AES rounds per clock cycle, and the
// round-key generator produces the two matching round keys in the same
// cycle. A block takes one preload cycle (initial AddRoundKey) and five
// round cycles, i.e. 6 cycles per 128-bit block (0.375 cycles/byte) when
// the input stream never stalls. The output register after the XOR holds a
// result until the consumer takes it; the next block's preload happens in
// the same cycle as that output is formed.
//
// Interface. start/mode/key/nblocks begin a streaming job; in_* and out_*
// are valid/ready streams of 128-bit blocks; done pulses when the last
// output block has been accepted. The two-round-per-cycle structure, the
// shared key schedule, the 6-cycle block time and the modes follow the
// document; the values of C_A and C_B, the ECB port and the handshakes are
// this design's choices.
module aes_unit
  import hwcrypt_pkg::*;
#(
  parameter logic [127:0] C_A = 128'h0,  // constant for the key update
  parameter logic [127:0] C_B = 128'h1   // constant for the pad
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  // streaming job
  input  logic         start_i,
  input  mode_e        mode_i,
  input  logic [127:0] key_i,
  input  logic [15:0]  nblocks_i,
  output logic         busy_o,
  output logic         done_o,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  logic [127:0] in_data_i,
  output logic         out_valid_o,
  input  logic         out_ready_i,
  output logic [127:0] out_data_o,
  // single encryption
  input  logic         ecb_req_i,
  input  logic [127:0] ecb_key_i,
  input  logic [127:0] ecb_pt_i,
  output logic         ecb_ack_o,
  output logic [127:0] ecb_ct_o
);

  typedef enum logic [2:0] {S_IDLE, S_ROUNDS, S_EMIT, S_ROUND1, S_ECB, S_FLUSH} state_e;
  state_e       state_q;
  logic [127:0] st_a_q, st_b_q, rk_q, key_q;
  logic [3:0]   rnd_q;          // index of the first round key used this cycle
  logic [15:0]  left_q;         // blocks still to produce
  logic         out_valid_q;
  logic [127:0] out_q;

  // Round-key generator: round keys rnd_q and rnd_q+1 from round key rnd_q-1
  logic [127:0] rk1, rk2;
  logic         last2;
  always_comb begin
    rk1   = key_step(rk_q, rnd_q);
    rk2   = key_step(rk1, rnd_q + 4'd1);
    last2 = (rnd_q == 4'd9);
  end

  // Two rounds per datapath
  logic [127:0] a_next, b_next;
  always_comb begin
    a_next = aes_round(aes_round(st_a_q, rk1, 1'b0), rk2, last2);
    b_next = aes_round(aes_round(st_b_q, rk1, 1'b0), rk2, last2);
  end

  // An output slot is free when the register is empty or being emptied
  logic out_free;
  assign out_free = !out_valid_q || out_ready_i;

  // In S_EMIT the pad is in st_b_q and the next key in st_a_q
  logic emit_fire, round_fire;
  assign emit_fire  = (state_q == S_EMIT)   && in_valid_i && out_free;
  assign round_fire = (state_q == S_ROUND1) && in_valid_i && out_free && (left_q != 16'd0);

  assign in_ready_o  = emit_fire || round_fire;
  assign out_valid_o = out_valid_q;
  assign out_data_o  = out_q;
  assign busy_o      = (state_q != S_IDLE);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      st_a_q      <= '0;
      st_b_q      <= '0;
      rk_q        <= '0;
      key_q       <= '0;
      rnd_q       <= '0;
      left_q      <= '0;
      out_valid_q <= 1'b0;
      out_q       <= '0;
      done_o      <= 1'b0;
      ecb_ack_o   <= 1'b0;
      ecb_ct_o    <= '0;
    end else begin
      done_o    <= 1'b0;
      ecb_ack_o <= 1'b0;
      if (out_valid_q && out_ready_i) out_valid_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start_i && nblocks_i != 16'd0) begin
            left_q     <= nblocks_i;
            key_q      <= key_i;
            if (mode_i == MODE_AES_ROUND) begin
              state_q <= S_ROUND1;
            end else begin
              // preload: round 0 AddRoundKey on both datapaths
              st_a_q  <= C_A ^ key_i;
              st_b_q  <= C_B ^ key_i;
              rk_q    <= key_i;
              rnd_q   <= 4'd1;
              state_q <= S_ROUNDS;
            end
          end else if (ecb_req_i && !ecb_ack_o) begin
            // a request still held in its acknowledge cycle is not taken again
            st_a_q  <= ecb_pt_i ^ ecb_key_i;
            st_b_q  <= '0;
            rk_q    <= ecb_key_i;
            rnd_q   <= 4'd1;
            state_q <= S_ECB;
          end
        end
        S_ROUNDS, S_ECB: begin
          st_a_q <= a_next;
          st_b_q <= b_next;
          rk_q   <= rk2;
          rnd_q  <= rnd_q + 4'd2;
          if (last2) begin
            if (state_q == S_ECB) begin
              ecb_ack_o <= 1'b1;
              ecb_ct_o  <= a_next;
              state_q   <= S_IDLE;
            end else begin
              state_q <= S_EMIT;
            end
          end
        end
        S_EMIT: begin
          if (emit_fire) begin
            out_q       <= in_data_i ^ st_b_q;
            out_valid_q <= 1'b1;
            left_q      <= left_q - 16'd1;
            if (left_q == 16'd1) begin
              state_q <= S_FLUSH;
            end else begin
              // preload of the next block with K' = st_a_q
              st_a_q  <= C_A ^ st_a_q;
              st_b_q  <= C_B ^ st_a_q;
              rk_q    <= st_a_q;
              rnd_q   <= 4'd1;
              state_q <= S_ROUNDS;
            end
          end
        end
        S_ROUND1: begin
          if (round_fire) begin
            out_q       <= aes_round(in_data_i, key_q, 1'b0);
            out_valid_q <= 1'b1;
            left_q      <= left_q - 16'd1;
            if (left_q == 16'd1) state_q <= S_FLUSH;
          end
        end
        S_FLUSH: begin
          if (!out_valid_q || out_ready_i) begin
            done_o  <= 1'b1;
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The output register is never overwritten while full and not taken
  assert property (@(posedge clk_i) disable iff (!rst_ni)
                   (out_valid_q && !out_ready_i) |=> (out_valid_q && $stable(out_q)));

endmodule
