// tb_hwcrypt_ctrl: self-checking testbench of the register file and job
// controller, with the units replaced by the testbench. Checks register
// write/read-back, the queue status bits, the start pulses and block counts
// issued per mode, hand-over of the re-keyed session key, the session-key
// result block of the re-keying-only mode, job and final events, the job
// counter and PRNG reseeding.
module tb_hwcrypt_ctrl;
  import hwcrypt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         req, we, gnt, rv;
  logic [7:0]   add;
  logic [31:0]  wdata, rdata;
  job_cfg_t     job;
  logic         busy, rk_start, rk_done, aes_start, sp_start, sin_start, sout_start;
  logic [127:0] rk_key, sess, res_data, seed;
  logic [15:0]  sin_n, sout_n;
  logic         units_busy, res_valid, res_ready, seed_valid, evt_job, evt_empty, ovf;

  hwcrypt_ctrl dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cfg_req_i(req), .cfg_add_i(add), .cfg_we_i(we), .cfg_wdata_i(wdata),
    .cfg_gnt_o(gnt), .cfg_r_valid_o(rv), .cfg_r_rdata_o(rdata),
    .job_o(job), .busy_o(busy),
    .rk_start_o(rk_start), .rk_done_i(rk_done), .rk_key_i(rk_key), .sess_key_o(sess),
    .aes_start_o(aes_start), .sponge_start_o(sp_start),
    .sin_start_o(sin_start), .sin_nblocks_o(sin_n),
    .sout_start_o(sout_start), .sout_nblocks_o(sout_n),
    .units_busy_i(units_busy),
    .res_valid_o(res_valid), .res_ready_i(res_ready), .res_data_o(res_data),
    .seed_valid_o(seed_valid), .seed_o(seed),
    .evt_job_o(evt_job), .evt_empty_o(evt_empty), .overflow_o(ovf)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event and pulse monitors
  int n_job = 0, n_empty = 0, n_rk = 0, n_aes = 0, n_sp = 0, n_sin = 0, n_sout = 0, n_seed = 0;
  logic [15:0] last_sin_n, last_sout_n;
  always @(posedge clk) if (rst_n) begin
    if (evt_job) n_job++;
    if (evt_empty) n_empty++;
    if (rk_start) n_rk++;
    if (aes_start) n_aes++;
    if (sp_start) n_sp++;
    if (sin_start) begin n_sin++; last_sin_n <= sin_n; end
    if (sout_start) begin n_sout++; last_sout_n <= sout_n; end
    if (seed_valid) n_seed++;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    req = 1; we = 1; add = a; wdata = d;
    @(negedge clk);
    req = 0; we = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req = 1; we = 0; add = a;
    @(negedge clk);
    req = 0;
    check(rv, "read response");
    d = rdata;
  endtask

  // units: busy for a while after a start
  task automatic units_run(input int n);
    units_busy = 1;
    repeat (n) @(negedge clk);
    units_busy = 0;
  endtask

  logic [31:0] d;
  initial begin
    req = 0; we = 0; add = 0; wdata = 0; rk_done = 0; rk_key = '0;
    units_busy = 0; res_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(8'h18, d);
    check(d == {3'd0, 5'd20, 3'd0, 5'd12, 3'd0, 5'd12, 3'd0, 5'd12}, "default round counts");
    wr(8'h08, 32'h0000_1000); rd(8'h08, d); check(d == 32'h1000, "SRC");
    wr(8'h0C, 32'h0000_2000); rd(8'h0C, d); check(d == 32'h2000, "DST");
    wr(8'h10, 32'd7);         rd(8'h10, d); check(d == 32'd7, "NBLOCKS");
    wr(8'h14, 32'h0000_07b0); rd(8'h14, d); check(d == 32'h0000_07b0, "CTRL");
    wr(8'h1C, 32'h0000_9043); rd(8'h1C, d); check(d == 32'h0000_9043, "RATES");
    wr(8'h20, 32'h0011_2233); wr(8'h24, 32'h4455_6677); wr(8'h28, 32'h8899_aabb); wr(8'h2C, 32'hccdd_eeff);
    wr(8'h44, 32'h1234_5678);
    @(negedge clk);
    check(n_seed == 1, "reseed pulse");
    rd(8'h04, d); check(d[3:0] == 4'd0, "idle, queue empty");

    // job A: 2PRG with re-keying (CTRL = 0x7b0: irq, rekey, post, shuffle, d=3)
    wr(8'h00, 1);
    repeat (5) @(negedge clk);
    check(n_rk == 1 && busy, $sformatf("re-keying started %0d %0d %0d %0d", n_rk, busy, n_sp, n_aes));
    check(job.key == 128'h0011_2233_4455_6677_8899_aabb_ccdd_eeff && job.mask_order == 3'd3,
          "job fields");
    rk_key = 128'hfeed_face_0000_1111_2222_3333_4444_5555;
    repeat (5) @(negedge clk);
    check(n_aes == 0, "stream waits for the session key");
    rk_done = 1; @(negedge clk); rk_done = 0;
    repeat (4) @(negedge clk);
    check(n_aes == 1 && n_sin == 1 && n_sout == 1 && n_sp == 0, "2PRG stream started");
    check(sess == rk_key, "session key handed over");
    check(last_sin_n == 16'd7 && last_sout_n == 16'd7, "2PRG block counts");
    units_run(10);
    repeat (3) @(negedge clk);
    check(n_job == 1 && n_empty == 1 && !busy, "job A events");

    // jobs B (ISAP MAC) and C (polynomial re-keying only), queued back to back
    wr(8'h14, 32'(MODE_ISAP_MAC));
    wr(8'h10, 32'd5);
    units_busy = 1;
    wr(8'h00, 1);
    wr(8'h14, 32'(MODE_POLY_RK) | (32'd1 << 10));
    wr(8'h00, 1);
    rd(8'h04, d); check(d[3:1] == 3'd1 && d[0], "one job queued behind a running one");
    check(n_sp == 1 && last_sin_n == 16'd5 && last_sout_n == 16'd1,
          $sformatf("ISAP MAC counts %0d %0d %0d", n_sp, last_sin_n, last_sout_n));
    units_busy = 0;
    repeat (6) @(negedge clk);
    check(n_rk == 2, "re-keying-only job started");
    rk_key = 128'h0123;
    rk_done = 1; @(negedge clk); rk_done = 0;
    repeat (3) @(negedge clk);
    check(res_valid && res_data == 128'h0123 && n_sin == 2,
          $sformatf("session key offered, no input read %0d %0d", res_valid, n_sin));
    check(last_sout_n == 16'd1, "one output block");
    res_ready = 1; @(negedge clk); res_ready = 0;
    repeat (4) @(negedge clk);
    check(n_job == 2 && n_empty == 2 && !busy, "events after B and C");
    rd(8'h48, d); check(d == 32'd3, "job counter");

    // overflow: six pushes while a job holds the unit
    units_busy = 1;
    wr(8'h14, 32'(MODE_ISAP_ENC));
    for (int i = 0; i < 7; i++) wr(8'h00, 1);
    rd(8'h04, d); check(d[4] && d[5], "full and dropped push");
    rd(8'h04, d); check(!d[5], "drop flag cleared by reading");
    units_busy = 0;
    repeat (100) @(negedge clk);
    rd(8'h48, d); check(d == 32'd9, "six more jobs ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
