// tb_hwcrypt: end-to-end testbench of the HWCRYPT accelerator at its
// default parameters (five-entry command queue).
//
// A behavioural two-port memory with random grant stalls serves the two
// TCDM ports. The testbench programs jobs through the register port the way
// a processor would, queues them while the accelerator is busy (up to a
// full queue and one dropped push), waits for the final event and compares
// the memory with the reference models:
//   2PRG with masked, shuffled, post-processed polynomial re-keying;
//   ISAP encryption of a message and ISAP MAC over the ciphertext;
//   ISAPRK with a 144-bit input; polynomial re-keying alone (masking order
//   2); the direct AES-round and Keccak permutation modes; plain 2PRG.
// It counts how often each mechanism happened (queue full, dropped push,
// memory stall, stream stall, job and final events, each mode) and fails a
// mechanism that never did. It also measures the 2PRG block time through
// the memory ports with stalls switched off.
module tb_hwcrypt;
  import hwcrypt_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_req, cfg_we, cfg_gnt, cfg_rv;
  logic [7:0]  cfg_add;
  logic [31:0] cfg_wdata, cfg_rdata;
  tcdm_req_t   req [2];
  tcdm_rsp_t   rsp [2];
  logic        evt_job, evt_empty, busy;
  int          stalls;

  hwcrypt dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cfg_req_i(cfg_req), .cfg_add_i(cfg_add), .cfg_we_i(cfg_we), .cfg_wdata_i(cfg_wdata),
    .cfg_gnt_o(cfg_gnt), .cfg_r_valid_o(cfg_rv), .cfg_r_rdata_o(cfg_rdata),
    .tcdm_rd_req_o(req[0]), .tcdm_rd_rsp_i(rsp[0]),
    .tcdm_wr_req_o(req[1]), .tcdm_wr_rsp_i(rsp[1]),
    .evt_job_o(evt_job), .evt_empty_o(evt_empty), .busy_o(busy)
  );

  tcdm_mem #(.WORDS(8192), .STALL_PCT(20)) mem (.clk_i(clk), .req_i(req), .rsp_o(rsp), .stalls_o(stalls));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_evt_job = 0, n_evt_empty = 0, n_full = 0, n_stream_stall = 0;
  int n_mode [7];
  always @(posedge clk) if (rst_n) begin
    if (evt_job) n_evt_job++;
    if (evt_empty) n_evt_empty++;
    if (dut.u_ctrl.q_full) n_full++;
    if (dut.u_aes.state_q == dut.u_aes.S_EMIT && !dut.aes_in_valid) n_stream_stall++;
    if (dut.u_ctrl.js_q == dut.u_ctrl.J_DISPATCH) n_mode[int'(dut.u_ctrl.job_q.mode)]++;
  end

  // ---------------- register access ----------------
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_req = 1; cfg_we = 1; cfg_add = a; cfg_wdata = d;
    @(negedge clk);
    cfg_req = 0; cfg_we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    cfg_req = 1; cfg_we = 0; cfg_add = a;
    @(negedge clk);
    cfg_req = 0;
    d = cfg_rdata;
    if (!cfg_rv) begin failures++; $display("FAIL: no read response"); end
  endtask

  task automatic wr128(input logic [7:0] a, input logic [127:0] v);
    for (int i = 0; i < 4; i++) wr(a + 8'(4*i), v[127-32*i -: 32]);
  endtask

  // queue one job; ctrl = CTRL register value
  task automatic queue_job(input mode_e m, input int src, input int dst, input int n,
                           input logic [127:0] k, input logic [127:0] nn,
                           input logic [31:0] ctrl, input logic [31:0] rounds,
                           input logic [31:0] rates, input logic [15:0] ext);
    wr(8'h08, 32'(src));
    wr(8'h0C, 32'(dst));
    wr(8'h10, 32'(n));
    wr(8'h14, ctrl | 32'(m));
    wr(8'h18, rounds);
    wr(8'h1C, rates);
    wr128(8'h20, k);
    wr128(8'h30, nn);
    wr(8'h40, {16'd0, ext});
    wr(8'h00, 32'd1);
  endtask

  function automatic logic [127:0] mblk(input int word);
    return {mem.mem[word], mem.mem[word+1], mem.mem[word+2], mem.mem[word+3]};
  endfunction

  task automatic wait_idle();
    logic [31:0] st;
    do begin
      repeat (20) @(negedge clk);
      rd(8'h04, st);
    end while (st[3:0] != 4'd0);
  endtask

  localparam logic [31:0] R_DEF   = {3'd0, 5'd20, 3'd0, 5'd12, 3'd0, 5'd12, 3'd0, 5'd12};
  localparam logic [31:0] RT_DEF  = {16'd0, 8'd128, 1'b0, 3'd7, 1'b0, 3'd0};
  localparam logic [31:0] RT_144  = {16'd0, 8'd144, 1'b0, 3'd7, 1'b0, 3'd0};
  localparam int W_P   = 0;      // word addresses
  localparam int W_C1  = 256;
  localparam int W_E   = 512;
  localparam int W_T   = 768;
  localparam int W_RK  = 800;
  localparam int W_PK  = 810;
  localparam int W_R   = 900;
  localparam int W_K   = 1000;
  localparam int W_C2  = 1100;
  localparam int W_BIG = 2048;

  logic [127:0] k1, n1, k2, n2, k3, n3, k4, n4, k5, k6, k8;
  logic [127:0] msg [];
  logic [127:0] ct [];
  logic [127:0] exp, kk, sess;
  logic [399:0] s400;
  logic [31:0]  st;
  isap_cfg_t    c;

  initial begin
    tb_ref_pkg::init();
    cfg_req = 0; cfg_we = 0; cfg_add = '0; cfg_wdata = '0;
    for (int i = 0; i < 8192; i++) mem.mem[i] = $urandom;
    k1 = {$urandom, $urandom, $urandom, $urandom}; n1 = {$urandom, $urandom, $urandom, $urandom};
    k2 = {$urandom, $urandom, $urandom, $urandom}; n2 = {$urandom, $urandom, $urandom, $urandom};
    k3 = {$urandom, $urandom, $urandom, $urandom}; n3 = {$urandom, $urandom, $urandom, $urandom};
    k4 = {$urandom, $urandom, $urandom, $urandom}; n4 = {$urandom, $urandom, $urandom, $urandom};
    k5 = {$urandom, $urandom, $urandom, $urandom};
    k6 = {$urandom, $urandom, $urandom, $urandom};
    k8 = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(8'h44, 32'hcafe_f00d);                         // reseed the PRNG

    // 1: 2PRG over 64 blocks, re-keyed with d=1, shuffling, post-processing, job event
    queue_job(MODE_PRG, 4*W_P, 4*W_C1, 64, k1, n1,
              (1 << 10) | (1 << 9) | (1 << 8) | (1 << 7) | (1 << 4), R_DEF, RT_DEF, 16'd0);
    // 2: ISAP encryption of 4 blocks
    queue_job(MODE_ISAP_ENC, 4*W_P, 4*W_E, 4, k2, n2, 1 << 10, R_DEF, RT_DEF, 16'd0);
    // 3: ISAP MAC over that ciphertext
    queue_job(MODE_ISAP_MAC, 4*W_E, 4*W_T, 4, k2, n2, 1 << 10, R_DEF, RT_DEF, 16'd0);
    // 4: ISAPRK, 144-bit input
    queue_job(MODE_ISAP_RK, 0, 4*W_RK, 0, k3, n3, 0, R_DEF, RT_144, 16'h5a5a);
    // 5: polynomial re-keying alone, masking order 2, shuffled
    queue_job(MODE_POLY_RK, 0, 4*W_PK, 0, k4, n4, (1 << 7) | (2 << 4), R_DEF, RT_DEF, 16'd0);
    // 6: AES round access
    queue_job(MODE_AES_ROUND, 4*W_P, 4*W_R, 3, k5, '0, 0, R_DEF, RT_DEF, 16'd0);
    rd(8'h04, st);
    check(st[4] == 1'b1, "queue full while the first job runs");
    // 7: pushed on a full queue: dropped
    wr(8'h00, 32'd1);
    rd(8'h04, st);
    check(st[5] == 1'b1, "dropped push reported");
    wait_idle();
    // 7: Keccak permutation access (20 rounds)
    queue_job(MODE_KECCAK, 4*W_P, 4*W_K, 4, '0, '0, 1 << 10, R_DEF, RT_DEF, 16'd0);
    // 8: plain 2PRG from the master key
    queue_job(MODE_PRG, 4*W_P, 4*W_C2, 5, k6, '0, 0, R_DEF, RT_DEF, 16'd0);
    wait_idle();

    // ---------------- results ----------------
    // 1
    sess = aes128(polymul(k1, n1), k1) ^ k1;
    kk = sess;
    for (int i = 0; i < 64; i++) begin
      check(mblk(W_C1 + 4*i) == (mblk(W_P + 4*i) ^ aes128(kk, 128'h1)), $sformatf("2PRG block %0d", i));
      kk = aes128(kk, 128'h0);
    end
    // 2 and 3
    c = '{sk: 12, sb: 12, se: 12, sh: 20, rb: 1, rd: 128, ybits: 128};
    msg = new[4];
    for (int i = 0; i < 4; i++) msg[i] = mblk(W_P + 4*i);
    isap_enc(k2, n2, c, msg, ct);
    for (int i = 0; i < 4; i++) check(mblk(W_E + 4*i) == ct[i], $sformatf("ISAP ENC block %0d", i));
    check(mblk(W_T) == isap_mac(k2, n2, c, ct), "ISAP MAC tag");
    // 4
    c.ybits = 144;
    s400 = isap_rk(k3, 2, {n3, 16'h5a5a}, c);
    check(mblk(W_RK) == s400[399:272], "ISAPRK output");
    // 5
    check(mblk(W_PK) == polymul(k4, n4), "polynomial re-keying output");
    // 6
    for (int i = 0; i < 3; i++)
      check(mblk(W_R + 4*i) == aes_one_round(mblk(W_P + 4*i), k5), $sformatf("AES round %0d", i));
    // 7
    kk = mblk(W_P+12);
    s400 = keccak_p400({mblk(W_P), mblk(W_P+4), mblk(W_P+8), kk[127:112]}, 20);
    check({mblk(W_K), mblk(W_K+4), mblk(W_K+8)} == s400[399:16], "Keccak access");
    // 8
    kk = k6;
    for (int i = 0; i < 5; i++) begin
      check(mblk(W_C2 + 4*i) == (mblk(W_P + 4*i) ^ aes128(kk, 128'h1)), $sformatf("plain 2PRG %0d", i));
      kk = aes128(kk, 128'h0);
    end
    rd(8'h48, st);
    check(st == 32'd8, $sformatf("8 jobs finished (%0d)", st));

    // ---------------- 2PRG block time through memory ----------------
    begin
      int t0, t1;
      mem.stall_pct = 0;
      queue_job(MODE_PRG, 4*W_BIG, 4*W_BIG, 64, k8, '0, 0, R_DEF, RT_DEF, 16'd0);
      while (!busy) @(negedge clk);
      t0 = 0;
      while (busy) begin @(negedge clk); t0++; end
      t1 = t0 - 64*6;
      check(t1 >= 0 && t1 < 20, $sformatf("64 blocks in %0d cycles (6 per block + fill)", t0));
    end

    // ---------------- mechanisms ----------------
    check(n_full > 0, "mechanism: queue full");
    check(n_evt_job == 4, $sformatf("mechanism: job events (%0d)", n_evt_job));
    check(n_evt_empty >= 2, "mechanism: final events");
    check(stalls > 0, "mechanism: memory stalls");
    check(n_stream_stall > 0, "mechanism: stream stalls");
    for (int m = 0; m < 7; m++) check(n_mode[m] > 0, $sformatf("mechanism: mode %0d ran", m));
    $display("mechanisms: full=%0d job_evt=%0d empty_evt=%0d mem_stalls=%0d stream_stalls=%0d",
             n_full, n_evt_job, n_evt_empty, stalls, n_stream_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
