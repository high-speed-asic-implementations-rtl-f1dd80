// hwcrypt_ctrl: memory-mapped configuration registers and job controller
// of HWCRYPT.
//
// Register file (32-bit peripheral slave, byte offsets; every access is
// granted at once and reads answer one cycle later on r_valid):
//   0x00 TRIGGER   write: push the current configuration into the queue
//   0x04 STATUS    read : [0] busy, [3:1] queued jobs, [4] queue full,
//                         [5] a push was dropped since the last read
//   0x08 SRC       source byte address        0x0C DST  destination address
//   0x10 NBLOCKS   number of 128-bit blocks
//   0x14 CTRL      [2:0] mode, [6:4] masking order d, [7] shuffle,
//                  [8] post-processing, [9] 2PRG re-keying, [10] job IRQ
//   0x18 ROUNDS    [4:0] s_k, [12:8] s_b, [20:16] s_e, [28:24] s_h
//   0x1C RATES     [2:0] log2 r_b, [6:4] log2 r_e/r_h, [15:8] ISAPRK bits
//   0x20-0x2C KEY0..KEY3 master key, KEY0 = bits [127:96]
//   0x30-0x3C NONCE0..NONCE3 nonce, NONCE0 = bits [127:96]
//   0x40 NONCE_EXT 16 extra nonce bits for a 144-bit ISAPRK input
//   0x44 SEED      write: reseed the PRNG from the 32-bit value
//   0x48 JOBS      read : number of finished jobs
//
// Job sequencing. When idle and the queue holds a job, the controller pops
// it. Modes that re-key with the polynomial unit (MODE_POLY_RK, and
// MODE_PRG with CTRL[9]) first run the re-keying unit; the 2PRG then starts
// from the session key. Then the input streamer, the output streamer and
// the selected unit are started together, and the job ends when all of
// them are idle. At the end of a job an intermediate event is raised if the
// job asked for it, and a final event when the queue is empty.
//
// The register contents (addresses, length, mode, key, nonce), the command
// queue, polling and the two kinds of interrupt follow the document; the
// register layout and the sequencing details are this design's choices.
module hwcrypt_ctrl
  import hwcrypt_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH = 5
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  // configuration port
  input  logic         cfg_req_i,
  input  logic [7:0]   cfg_add_i,
  input  logic         cfg_we_i,
  input  logic [31:0]  cfg_wdata_i,
  output logic         cfg_gnt_o,
  output logic         cfg_r_valid_o,
  output logic [31:0]  cfg_r_rdata_o,
  // current job
  output job_cfg_t     job_o,
  output logic         busy_o,
  // re-keying unit
  output logic         rk_start_o,
  input  logic         rk_done_i,
  input  logic [127:0] rk_key_i,
  output logic [127:0] sess_key_o,
  // units and streamers
  output logic         aes_start_o,
  output logic         sponge_start_o,
  output logic         sin_start_o,
  output logic [15:0]  sin_nblocks_o,
  output logic         sout_start_o,
  output logic [15:0]  sout_nblocks_o,
  input  logic         units_busy_i,   // AES unit, sponge unit or streamers
  // session key as an output block (MODE_POLY_RK)
  output logic         res_valid_o,
  input  logic         res_ready_i,
  output logic [127:0] res_data_o,
  // PRNG seeding
  output logic         seed_valid_o,
  output logic [127:0] seed_o,
  // events
  output logic         evt_job_o,
  output logic         evt_empty_o,
  output logic         overflow_o
);

  // ------------------------------------------------------------------
  // configuration registers
  // ------------------------------------------------------------------
  job_cfg_t cfg_q;
  logic     push;
  logic     ovf_sticky_q;
  logic [31:0] jobs_q;
  logic [$clog2(QUEUE_DEPTH+1)-1:0] q_count;
  logic     q_empty, q_full, q_ovf, pop;
  job_cfg_t q_head;

  cmd_queue #(.DEPTH(QUEUE_DEPTH)) u_queue (
    .clk_i, .rst_ni,
    .push_i (push), .data_i (cfg_q),
    .pop_i  (pop),  .head_o (q_head),
    .empty_o(q_empty), .full_o(q_full), .count_o(q_count),
    .overflow_o(q_ovf)
  );

  logic wr, rd;
  assign wr        = cfg_req_i && cfg_we_i;
  assign rd        = cfg_req_i && !cfg_we_i;
  assign push      = wr && (cfg_add_i == 8'h00);
  assign cfg_gnt_o = cfg_req_i;
  assign overflow_o = q_ovf;

  logic [31:0] rdata;
  always_comb begin
    unique case (cfg_add_i)
      8'h04: rdata = {26'd0, ovf_sticky_q, q_full, 3'(q_count), busy_o};
      8'h08: rdata = cfg_q.src;
      8'h0C: rdata = cfg_q.dst;
      8'h10: rdata = {16'd0, cfg_q.nblocks};
      8'h14: rdata = {21'd0, cfg_q.irq_job_en, cfg_q.rekey_en, cfg_q.postproc_en,
                      cfg_q.shuffle_en, cfg_q.mask_order, 1'b0, cfg_q.mode};
      8'h18: rdata = {3'd0, cfg_q.s_h, 3'd0, cfg_q.s_e, 3'd0, cfg_q.s_b, 3'd0, cfg_q.s_k};
      8'h1C: rdata = {16'd0, cfg_q.rk_bits, 1'b0, cfg_q.data_rate_log, 1'b0, cfg_q.rk_rate_log};
      8'h48: rdata = jobs_q;
      default: rdata = 32'd0;   // key and nonce are write-only
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cfg_q         <= '0;
      cfg_q.s_k     <= 5'd12;
      cfg_q.s_b     <= 5'd12;
      cfg_q.s_e     <= 5'd12;
      cfg_q.s_h     <= 5'd20;
      cfg_q.data_rate_log <= 3'd7;
      cfg_q.rk_bits <= 8'd128;
      cfg_r_valid_o <= 1'b0;
      cfg_r_rdata_o <= '0;
      ovf_sticky_q  <= 1'b0;
      seed_valid_o  <= 1'b0;
      seed_o        <= '0;
    end else begin
      cfg_r_valid_o <= rd;
      seed_valid_o  <= 1'b0;
      if (rd) cfg_r_rdata_o <= rdata;
      if (q_ovf) ovf_sticky_q <= 1'b1;
      else if (rd && cfg_add_i == 8'h04) ovf_sticky_q <= 1'b0;
      if (wr) begin
        unique case (cfg_add_i)
          8'h08: cfg_q.src     <= cfg_wdata_i;
          8'h0C: cfg_q.dst     <= cfg_wdata_i;
          8'h10: cfg_q.nblocks <= cfg_wdata_i[15:0];
          8'h14: begin
            cfg_q.mode        <= mode_e'(cfg_wdata_i[2:0]);
            cfg_q.mask_order  <= cfg_wdata_i[6:4];
            cfg_q.shuffle_en  <= cfg_wdata_i[7];
            cfg_q.postproc_en <= cfg_wdata_i[8];
            cfg_q.rekey_en    <= cfg_wdata_i[9];
            cfg_q.irq_job_en  <= cfg_wdata_i[10];
          end
          8'h18: begin
            cfg_q.s_k <= cfg_wdata_i[4:0];
            cfg_q.s_b <= cfg_wdata_i[12:8];
            cfg_q.s_e <= cfg_wdata_i[20:16];
            cfg_q.s_h <= cfg_wdata_i[28:24];
          end
          8'h1C: begin
            cfg_q.rk_rate_log   <= cfg_wdata_i[2:0];
            cfg_q.data_rate_log <= cfg_wdata_i[6:4];
            cfg_q.rk_bits       <= cfg_wdata_i[15:8];
          end
          8'h20: cfg_q.key[127:96]   <= cfg_wdata_i;
          8'h24: cfg_q.key[95:64]    <= cfg_wdata_i;
          8'h28: cfg_q.key[63:32]    <= cfg_wdata_i;
          8'h2C: cfg_q.key[31:0]     <= cfg_wdata_i;
          8'h30: cfg_q.nonce[127:96] <= cfg_wdata_i;
          8'h34: cfg_q.nonce[95:64]  <= cfg_wdata_i;
          8'h38: cfg_q.nonce[63:32]  <= cfg_wdata_i;
          8'h3C: cfg_q.nonce[31:0]   <= cfg_wdata_i;
          8'h40: cfg_q.nonce_ext     <= cfg_wdata_i[15:0];
          8'h44: begin
            seed_valid_o <= 1'b1;
            seed_o       <= {cfg_wdata_i, ~cfg_wdata_i, cfg_wdata_i ^ 32'h9e37_79b9,
                             cfg_wdata_i ^ 32'h7f4a_7c15};
          end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------------
  // job sequencer
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {J_IDLE, J_DISPATCH, J_RK_WAIT, J_START, J_RUN, J_FINISH} jstate_e;
  jstate_e  js_q;
  job_cfg_t job_q;
  logic     res_valid_q;
  logic [127:0] sess_q;

  assign pop          = (js_q == J_IDLE) && !q_empty;
  assign job_o        = job_q;
  assign busy_o       = (js_q != J_IDLE);
  assign sess_key_o   = sess_q;
  assign res_valid_o  = res_valid_q;
  assign res_data_o   = sess_q;

  logic rk_needed;
  assign rk_needed = (job_q.mode == MODE_POLY_RK) || (job_q.mode == MODE_PRG && job_q.rekey_en);

  always_comb begin
    sin_nblocks_o  = job_q.nblocks;
    sout_nblocks_o = job_q.nblocks;
    unique case (job_q.mode)
      MODE_ISAP_MAC: sout_nblocks_o = 16'd1;
      MODE_ISAP_RK, MODE_POLY_RK: begin
        sin_nblocks_o  = 16'd0;
        sout_nblocks_o = 16'd1;
      end
      MODE_KECCAK: begin
        sin_nblocks_o  = 16'd4;
        sout_nblocks_o = 16'd4;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      js_q           <= J_IDLE;
      job_q          <= '0;
      sess_q         <= '0;
      res_valid_q    <= 1'b0;
      rk_start_o     <= 1'b0;
      aes_start_o    <= 1'b0;
      sponge_start_o <= 1'b0;
      sin_start_o    <= 1'b0;
      sout_start_o   <= 1'b0;
      evt_job_o      <= 1'b0;
      evt_empty_o    <= 1'b0;
      jobs_q         <= '0;
    end else begin
      rk_start_o     <= 1'b0;
      aes_start_o    <= 1'b0;
      sponge_start_o <= 1'b0;
      sin_start_o    <= 1'b0;
      sout_start_o   <= 1'b0;
      evt_job_o      <= 1'b0;
      evt_empty_o    <= 1'b0;
      if (res_valid_q && res_ready_i) res_valid_q <= 1'b0;
      unique case (js_q)
        J_IDLE: if (!q_empty) begin
          job_q <= q_head;
          js_q  <= J_DISPATCH;
        end
        J_DISPATCH: begin
          sess_q <= job_q.key;
          if (rk_needed) begin
            rk_start_o <= 1'b1;
            js_q       <= J_RK_WAIT;
          end else begin
            js_q <= J_START;
          end
        end
        J_RK_WAIT: if (rk_done_i) begin
          sess_q <= rk_key_i;
          js_q   <= J_START;
        end
        J_START: begin
          sin_start_o  <= (sin_nblocks_o != 16'd0);
          sout_start_o <= 1'b1;
          if (job_q.mode == MODE_PRG || job_q.mode == MODE_AES_ROUND) aes_start_o <= 1'b1;
          else if (job_q.mode == MODE_POLY_RK) res_valid_q <= 1'b1;
          else sponge_start_o <= 1'b1;
          js_q <= J_RUN;
        end
        J_RUN: begin
          // the start pulses reach the units in this cycle
          if (!sin_start_o && !sout_start_o && !units_busy_i && !res_valid_q) js_q <= J_FINISH;
        end
        J_FINISH: begin
          jobs_q      <= jobs_q + 32'd1;
          evt_job_o   <= job_q.irq_job_en;
          evt_empty_o <= q_empty;
          js_q        <= J_IDLE;
        end
        default: js_q <= J_IDLE;
      endcase
    end
  end

endmodule
