// tb_tcdm_streamer_in: self-checking testbench of the input streamer.
// A memory model with random grant stalls holds random words; the
// streamer's blocks are taken with random back-pressure and compared with
// the words packed four at a time (lowest address in bits [127:96]). With
// no stalls the streamer must deliver one block every 4 cycles.
module tb_tcdm_streamer_in;
  import hwcrypt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, ov, or_;
  logic [31:0]  addr;
  logic [15:0]  nb;
  logic [127:0] od;
  tcdm_req_t    req [2];
  tcdm_rsp_t    rsp_s [2], rsp_f [2];
  int           st_s, st_f;
  bit           slow;

  tcdm_streamer_in dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .addr_i(addr), .nblocks_i(nb),
    .busy_o(busy), .tcdm_req_o(req[0]), .tcdm_rsp_i(slow ? rsp_s[0] : rsp_f[0]),
    .out_valid_o(ov), .out_ready_i(or_), .out_data_o(od)
  );
  assign req[1] = '0;

  tcdm_mem #(.WORDS(1024), .STALL_PCT(30)) mem_s (.clk_i(clk), .req_i(req), .rsp_o(rsp_s), .stalls_o(st_s));
  tcdm_mem #(.WORDS(1024), .STALL_PCT(0))  mem_f (.clk_i(clk), .req_i(req), .rsp_o(rsp_f), .stalls_o(st_f));

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

  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic run(input int base_word, input int n, input int bp_pct, input bit rate);
    int got, last, bad;
    logic [127:0] exp;
    @(negedge clk);
    start = 1; addr = 32'(base_word * 4); nb = 16'(n);
    @(negedge clk);
    start = 0;
    got = 0; last = -1; bad = 0;
    while (got < n) begin
      or_ = ($urandom_range(99) >= bp_pct);
      @(posedge clk);
      if (ov && or_) begin
        if (slow) exp = {mem_s.mem[base_word+4*got], mem_s.mem[base_word+4*got+1],
                         mem_s.mem[base_word+4*got+2], mem_s.mem[base_word+4*got+3]};
        else      exp = {mem_f.mem[base_word+4*got], mem_f.mem[base_word+4*got+1],
                         mem_f.mem[base_word+4*got+2], mem_f.mem[base_word+4*got+3]};
        check(od == exp, $sformatf("block %0d", got));
        if (rate && last >= 0 && cycle - last != 4) bad++;
        last = cycle;
        got++;
      end
      @(negedge clk);
    end
    if (rate) check(bad == 0, "one block every 4 cycles");
    repeat (2) @(negedge clk);
    check(!busy && !ov, "idle after the job");
  endtask

  initial begin
    start = 0; addr = '0; nb = '0; or_ = 0; slow = 0;
    for (int i = 0; i < 1024; i++) begin
      mem_s.mem[i] = $urandom;
      mem_f.mem[i] = mem_s.mem[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 12, 0, 1);
    run(100, 9, 50, 0);
    slow = 1;
    run(200, 15, 30, 0);
    run(7, 1, 0, 0);
    check(st_s > 0, "memory stalls occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
