// hwcrypt: HWCRYPT, a software-programmable accelerator for leakage-resilient
// cryptography that sits in the shared data memory of a processor cluster.
//
// Structure (left to right along the data):
//   TCDM port 0 -> tcdm_streamer_in  -> AES unit (2PRG, AES round)     ->
//                                    -> sponge unit (ISAP, Keccak-p400) ->
//                                       re-keying result (session key) ->
//                  tcdm_streamer_out -> TCDM port 1
// The polynomial re-keying unit derives session keys from the configured
// master key and nonce, drawing masks and shuffling positions from the
// PRNG, and uses the AES unit's single-encryption port for its
// post-processing. hwcrypt_ctrl holds the memory-mapped registers and the
// five-entry command queue and starts the units job by job.
//
// Interface. cfg_*: 32-bit register port (see hwcrypt_ctrl for the map).
// tcdm_rd_*: read port of the input streamer, tcdm_wr_*: write port of the
// output streamer, both word ports with request/grant and in-order read
// responses. evt_job_o pulses when a job that asked for it ends,
// evt_empty_o when a job ends with the queue empty; busy_o is high while a
// job runs.
//
// Timing. 2PRG: 6 cycles per 16-byte block plus re-keying (18*(d+1) cycles,
// plus the AES post-processing if enabled). ISAP encryption at a 128-bit
// rate and 12 rounds: 5 cycles per block. The memory ports move one word
// per cycle each, so a block needs 4 cycles on each port.
// The set of units and how they connect follow the document; the routing of
// the streams by mode is this design's choice.
module hwcrypt
  import hwcrypt_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH   = 5,
  parameter int unsigned IN_FIFO_DEPTH = 2
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // configuration port
  input  logic        cfg_req_i,
  input  logic [7:0]  cfg_add_i,
  input  logic        cfg_we_i,
  input  logic [31:0] cfg_wdata_i,
  output logic        cfg_gnt_o,
  output logic        cfg_r_valid_o,
  output logic [31:0] cfg_r_rdata_o,
  // TCDM ports
  output tcdm_req_t   tcdm_rd_req_o,
  input  tcdm_rsp_t   tcdm_rd_rsp_i,
  output tcdm_req_t   tcdm_wr_req_o,
  input  tcdm_rsp_t   tcdm_wr_rsp_i,
  // events
  output logic        evt_job_o,
  output logic        evt_empty_o,
  output logic        busy_o
);

  job_cfg_t     job;
  logic         rk_start, rk_done, rk_busy;
  logic [127:0] rk_key, sess_key;
  logic         aes_start, sponge_start, sin_start, sout_start;
  logic [15:0]  sin_n, sout_n;
  logic         res_valid, res_ready;
  logic [127:0] res_data;
  logic         seed_valid;
  logic [127:0] seed;
  logic         overflow;

  // streams
  logic         sin_valid, sin_ready, sin_busy;
  logic [127:0] sin_data;
  logic         sout_valid, sout_ready, sout_busy;
  logic [127:0] sout_data;
  logic         aes_in_valid, aes_in_ready, aes_out_valid, aes_out_ready, aes_busy, aes_done;
  logic [127:0] aes_out_data;
  logic         sp_in_valid, sp_in_ready, sp_out_valid, sp_out_ready, sp_busy, sp_done;
  logic [127:0] sp_out_data;

  // AES single encryption for re-keying post-processing
  logic         ecb_req, ecb_ack;
  logic [127:0] ecb_key, ecb_pt, ecb_ct;

  // randomness
  logic         rnd_next;
  logic [127:0] rnd;

  hwcrypt_ctrl #(.QUEUE_DEPTH(QUEUE_DEPTH)) u_ctrl (
    .clk_i, .rst_ni,
    .cfg_req_i, .cfg_add_i, .cfg_we_i, .cfg_wdata_i,
    .cfg_gnt_o, .cfg_r_valid_o, .cfg_r_rdata_o,
    .job_o          (job),
    .busy_o,
    .rk_start_o     (rk_start),
    .rk_done_i      (rk_done),
    .rk_key_i       (rk_key),
    .sess_key_o     (sess_key),
    .aes_start_o    (aes_start),
    .sponge_start_o (sponge_start),
    .sin_start_o    (sin_start),
    .sin_nblocks_o  (sin_n),
    .sout_start_o   (sout_start),
    .sout_nblocks_o (sout_n),
    .units_busy_i   (aes_busy || sp_busy || sin_busy || sout_busy || rk_busy),
    .res_valid_o    (res_valid),
    .res_ready_i    (res_ready),
    .res_data_o     (res_data),
    .seed_valid_o   (seed_valid),
    .seed_o         (seed),
    .evt_job_o,
    .evt_empty_o,
    .overflow_o     (overflow)
  );

  prng u_prng (
    .clk_i, .rst_ni,
    .seed_valid_i(seed_valid), .seed_i(seed),
    .next_i(rnd_next), .rnd_o(rnd)
  );

  rekey_unit u_rekey (
    .clk_i, .rst_ni,
    .start_i      (rk_start),
    .key_i        (job.key),
    .nonce_i      (job.nonce),
    .mask_order_i (job.mask_order),
    .shuffle_en_i (job.shuffle_en),
    .postproc_en_i(job.postproc_en),
    .rnd_next_o   (rnd_next),
    .rnd_i        (rnd),
    .aes_req_o    (ecb_req),
    .aes_key_o    (ecb_key),
    .aes_pt_o     (ecb_pt),
    .aes_ack_i    (ecb_ack),
    .aes_ct_i     (ecb_ct),
    .busy_o       (rk_busy),
    .done_o       (rk_done),
    .key_o        (rk_key)
  );

  tcdm_streamer_in #(.FIFO_DEPTH(IN_FIFO_DEPTH)) u_sin (
    .clk_i, .rst_ni,
    .start_i    (sin_start),
    .addr_i     (job.src),
    .nblocks_i  (sin_n),
    .busy_o     (sin_busy),
    .tcdm_req_o (tcdm_rd_req_o),
    .tcdm_rsp_i (tcdm_rd_rsp_i),
    .out_valid_o(sin_valid),
    .out_ready_i(sin_ready),
    .out_data_o (sin_data)
  );

  aes_unit u_aes (
    .clk_i, .rst_ni,
    .start_i    (aes_start),
    .mode_i     (job.mode),
    .key_i      (sess_key),
    .nblocks_i  (job.nblocks),
    .busy_o     (aes_busy),
    .done_o     (aes_done),
    .in_valid_i (aes_in_valid),
    .in_ready_o (aes_in_ready),
    .in_data_i  (sin_data),
    .out_valid_o(aes_out_valid),
    .out_ready_i(aes_out_ready),
    .out_data_o (aes_out_data),
    .ecb_req_i  (ecb_req),
    .ecb_key_i  (ecb_key),
    .ecb_pt_i   (ecb_pt),
    .ecb_ack_o  (ecb_ack),
    .ecb_ct_o   (ecb_ct)
  );

  sponge_unit u_sponge (
    .clk_i, .rst_ni,
    .start_i        (sponge_start),
    .mode_i         (job.mode),
    .key_i          (job.key),
    .nonce_i        (job.nonce),
    .nonce_ext_i    (job.nonce_ext),
    .nblocks_i      (job.nblocks),
    .s_k_i          (job.s_k),
    .s_b_i          (job.s_b),
    .s_e_i          (job.s_e),
    .s_h_i          (job.s_h),
    .rk_rate_log_i  (job.rk_rate_log),
    .data_rate_log_i(job.data_rate_log),
    .rk_bits_i      (job.rk_bits),
    .busy_o         (sp_busy),
    .done_o         (sp_done),
    .in_valid_i     (sp_in_valid),
    .in_ready_o     (sp_in_ready),
    .in_data_i      (sin_data),
    .out_valid_o    (sp_out_valid),
    .out_ready_i    (sp_out_ready),
    .out_data_o     (sp_out_data)
  );

  tcdm_streamer_out u_sout (
    .clk_i, .rst_ni,
    .start_i    (sout_start),
    .addr_i     (job.dst),
    .nblocks_i  (sout_n),
    .busy_o     (sout_busy),
    .in_valid_i (sout_valid),
    .in_ready_o (sout_ready),
    .in_data_i  (sout_data),
    .tcdm_req_o (tcdm_wr_req_o),
    .tcdm_rsp_i (tcdm_wr_rsp_i)
  );

  // stream routing by job mode
  logic use_aes, use_res;
  assign use_aes = (job.mode == MODE_PRG) || (job.mode == MODE_AES_ROUND);
  assign use_res = (job.mode == MODE_POLY_RK);

  always_comb begin
    aes_in_valid  = use_aes && sin_valid;
    sp_in_valid   = !use_aes && !use_res && sin_valid;
    sin_ready     = use_aes ? aes_in_ready : (!use_res && sp_in_ready);
    aes_out_ready = use_aes && sout_ready;
    sp_out_ready  = !use_aes && !use_res && sout_ready;
    res_ready     = use_res && sout_ready;
    if (use_aes) begin
      sout_valid = aes_out_valid;
      sout_data  = aes_out_data;
    end else if (use_res) begin
      sout_valid = res_valid;
      sout_data  = res_data;
    end else begin
      sout_valid = sp_out_valid;
      sout_data  = sp_out_data;
    end
  end

  // completion pulses and the overflow flag are observed through busy
  // signals and the STATUS register
  logic unused;
  assign unused = aes_done ^ sp_done ^ overflow;

endmodule
