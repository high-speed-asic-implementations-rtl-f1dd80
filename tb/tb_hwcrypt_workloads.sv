// tb_hwcrypt_workloads: the two use cases of the accelerator at their
// evaluated message size of 8 kB (512 blocks), run end to end through the
// register port and the two memory ports at the default parameters, plus
// one 8960-byte (560-block) 2PRG frame with memory stalls.
//
//  NETCOM:    2PRG encryption of 8 kB with first-order masked, shuffled and
//             post-processed polynomial re-keying. The cycle count from the
//             trigger to the final event must not exceed 3171 cycles, the
//             count implied by 5.29 Gbit/s at 256 MHz for this message.
//  BULKSTORE: ISAP encryption of 8 kB followed by the ISAP MAC over the
//             ciphertext (s_k = s_b = s_e = 12, s_h = 20, r_b = 1, 128-bit
//             data rate). The total must not exceed 8673 cycles (2.69 Gbit/s
//             at 356 MHz), and the encryption alone, without its re-keying,
//             must not exceed 6 cycles per block (0.38 cycles per byte).
// The memory runs without stalls for the timed jobs. Every output block and
// the tag are compared with the reference models.
module tb_hwcrypt_workloads;
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

  // 64 kB of shared data memory
  tcdm_mem #(.WORDS(16384), .STALL_PCT(0)) mem (.clk_i(clk), .req_i(req), .rsp_o(rsp), .stalls_o(stalls));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counter and job-event times
  int cyc = 0;
  int t_evt [$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (evt_job) t_evt.push_back(cyc);
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_req = 1; cfg_we = 1; cfg_add = a; cfg_wdata = d;
    @(negedge clk);
    cfg_req = 0; cfg_we = 0;
  endtask

  task automatic wr128(input logic [7:0] a, input logic [127:0] v);
    for (int i = 0; i < 4; i++) wr(a + 8'(4*i), v[127-32*i -: 32]);
  endtask

  // write all registers of a job except the trigger
  task automatic setup_job(input mode_e m, input int src, input int dst, input int n,
                           input logic [127:0] k, input logic [127:0] nn,
                           input logic [31:0] ctrl);
    wr(8'h08, 32'(src));
    wr(8'h0C, 32'(dst));
    wr(8'h10, 32'(n));
    wr(8'h14, ctrl | 32'(m) | (1 << 10));            // job event on
    wr(8'h18, {3'd0, 5'd20, 3'd0, 5'd12, 3'd0, 5'd12, 3'd0, 5'd12});
    wr(8'h1C, {16'd0, 8'd128, 1'b0, 3'd7, 1'b0, 3'd0});
    wr128(8'h20, k);
    wr128(8'h30, nn);
  endtask

  function automatic logic [127:0] mblk(input int word);
    return {mem.mem[word], mem.mem[word+1], mem.mem[word+2], mem.mem[word+3]};
  endfunction

  localparam int NB   = 512;          // 8 kB
  localparam int NJ   = 560;          // 8960 bytes
  localparam int W_P  = 0;            // word addresses
  localparam int W_C  = 4096;
  localparam int W_E  = 8192;
  localparam int W_T  = 12288;
  localparam int W_J  = 12800;

  logic [127:0] k1, n1, k2, n2, k3, kk;
  logic [127:0] msg [];
  logic [127:0] ct [];
  isap_cfg_t    c;
  int           t0, n_ev;

  initial begin
    tb_ref_pkg::init();
    cfg_req = 0; cfg_we = 0; cfg_add = '0; cfg_wdata = '0;
    for (int i = 0; i < 16384; i++) mem.mem[i] = $urandom;
    k1 = {$urandom, $urandom, $urandom, $urandom}; n1 = {$urandom, $urandom, $urandom, $urandom};
    k2 = {$urandom, $urandom, $urandom, $urandom}; n2 = {$urandom, $urandom, $urandom, $urandom};
    k3 = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(8'h44, 32'h1234_5678);

    // ---------------- NETCOM ----------------
    setup_job(MODE_PRG, 4*W_P, 4*W_C, NB, k1, n1, (1 << 9) | (1 << 8) | (1 << 7) | (1 << 4));
    n_ev = t_evt.size();
    wr(8'h00, 32'd1);
    t0 = cyc;
    while (t_evt.size() == n_ev) @(negedge clk);
    $display("NETCOM: %0d blocks in %0d cycles", NB, t_evt[n_ev] - t0);
    check(t_evt[n_ev] - t0 <= 3171, $sformatf("NETCOM within 3171 cycles (%0d)", t_evt[n_ev] - t0));
    kk = aes128(polymul(k1, n1), k1) ^ k1;
    for (int i = 0; i < NB; i++) begin
      check(mblk(W_C + 4*i) == (mblk(W_P + 4*i) ^ aes128(kk, 128'h1)), $sformatf("NETCOM block %0d", i));
      kk = aes128(kk, 128'h0);
    end

    // ---------------- BULKSTORE ----------------
    setup_job(MODE_ISAP_ENC, 4*W_P, 4*W_E, NB, k2, n2, 0);
    n_ev = t_evt.size();
    wr(8'h00, 32'd1);
    t0 = cyc;
    setup_job(MODE_ISAP_MAC, 4*W_E, 4*W_T, NB, k2, n2, 0);
    wr(8'h00, 32'd1);
    while (t_evt.size() < n_ev + 2) @(negedge clk);
    $display("BULKSTORE: encryption %0d cycles, encryption + MAC %0d cycles",
             t_evt[n_ev] - t0, t_evt[n_ev+1] - t0);
    check(t_evt[n_ev] - t0 - 727 <= 6 * NB,
          $sformatf("ISAP encryption at most 6 cycles per block after ISAPRK (%0d)", t_evt[n_ev] - t0 - 727));
    check(t_evt[n_ev+1] - t0 <= 8673, $sformatf("BULKSTORE within 8673 cycles (%0d)", t_evt[n_ev+1] - t0));
    c = '{sk: 12, sb: 12, se: 12, sh: 20, rb: 1, rd: 128, ybits: 128};
    msg = new[NB];
    for (int i = 0; i < NB; i++) msg[i] = mblk(W_P + 4*i);
    isap_enc(k2, n2, c, msg, ct);
    for (int i = 0; i < NB; i++) check(mblk(W_E + 4*i) == ct[i], $sformatf("BULKSTORE block %0d", i));
    check(mblk(W_T) == isap_mac(k2, n2, c, ct), "BULKSTORE tag");

    // ---------------- jumbo frame with memory stalls ----------------
    mem.stall_pct = 25;
    setup_job(MODE_PRG, 4*W_P, 4*W_J, NJ, k3, '0, 0);
    n_ev = t_evt.size();
    wr(8'h00, 32'd1);
    while (t_evt.size() == n_ev) @(negedge clk);
    kk = k3;
    for (int i = 0; i < NJ; i++) begin
      check(mblk(W_J + 4*i) == (mblk(W_P + 4*i) ^ aes128(kk, 128'h1)), $sformatf("frame block %0d", i));
      kk = aes128(kk, 128'h0);
    end
    check(stalls > 0, "memory stalls happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
