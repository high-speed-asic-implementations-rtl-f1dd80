// tb_tcdm_streamer_out: self-checking testbench of the output streamer.
// Random blocks are offered with random gaps to a memory model with random
// grant stalls; afterwards memory must hold every block as four words
// (bits [127:96] at the lowest address) and nothing outside the range may
// change.
module tb_tcdm_streamer_out;
  import hwcrypt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, iv, ir;
  logic [31:0]  addr;
  logic [15:0]  nb;
  logic [127:0] id;
  tcdm_req_t    req [2];
  tcdm_rsp_t    rsp [2];
  int           stalls;
  int           stall_pct_unused;

  tcdm_streamer_out dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .addr_i(addr), .nblocks_i(nb),
    .busy_o(busy), .in_valid_i(iv), .in_ready_o(ir), .in_data_i(id),
    .tcdm_req_o(req[0]), .tcdm_rsp_i(rsp[0])
  );
  assign req[1] = '0;
  tcdm_mem #(.WORDS(1024), .STALL_PCT(25)) mem (.clk_i(clk), .req_i(req), .rsp_o(rsp), .stalls_o(stalls));

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

  task automatic run(input int base_word, input int n, input int gap_pct);
    logic [127:0] blk [];
    logic [31:0] before_lo, before_hi;
    int sent;
    blk = new[n];
    foreach (blk[i]) blk[i] = {$urandom, $urandom, $urandom, $urandom};
    before_lo = mem.mem[base_word-1];
    before_hi = mem.mem[base_word+4*n];
    @(negedge clk);
    start = 1; addr = 32'(base_word * 4); nb = 16'(n);
    @(negedge clk);
    start = 0;
    sent = 0;
    while (sent < n) begin
      iv = ($urandom_range(99) >= gap_pct);
      id = blk[sent];
      @(posedge clk);
      if (iv && ir) sent++;
      @(negedge clk);
    end
    iv = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < n; i++)
      check({mem.mem[base_word+4*i], mem.mem[base_word+4*i+1], mem.mem[base_word+4*i+2],
             mem.mem[base_word+4*i+3]} == blk[i], $sformatf("block %0d", i));
    check(mem.mem[base_word-1] == before_lo && mem.mem[base_word+4*n] == before_hi,
          "no write outside the range");
  endtask

  initial begin
    start = 0; addr = '0; nb = '0; iv = 0; id = '0;
    for (int i = 0; i < 1024; i++) mem.mem[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 10, 0);
    run(300, 7, 40);
    run(601, 1, 0);
    check(stalls > 0, "memory stalls occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
