// tb_rekey_unit: self-checking testbench of the polynomial re-keying unit.
// Randomness comes from $urandom; the AES call of the post-processing is
// answered by the testbench from the reference AES after a random delay.
// Checks K* = K . n against a plain convolution for masking orders 0..4,
// with and without shuffling, the cycle count 18*(d+1) (+1 for the start
// cycle), K_out = AES_{K*}(K) ^ K with post-processing, that every index is
// used exactly once per share and that shuffling changes the order.
module tb_rekey_unit;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, shuffle, post, rnd_next, aes_req, aes_ack, busy, done;
  logic [127:0] key, nonce, rnd, aes_key, aes_pt, aes_ct, kout;
  logic [2:0]   d;

  rekey_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(key), .nonce_i(nonce),
    .mask_order_i(d), .shuffle_en_i(shuffle), .postproc_en_i(post),
    .rnd_next_o(rnd_next), .rnd_i(rnd),
    .aes_req_o(aes_req), .aes_key_o(aes_key), .aes_pt_o(aes_pt),
    .aes_ack_i(aes_ack), .aes_ct_i(aes_ct),
    .busy_o(busy), .done_o(done), .key_o(kout)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fresh randomness every cycle
  always @(posedge clk) rnd <= {$urandom, $urandom, $urandom, $urandom};

  // AES responder
  initial begin
    aes_ack = 0; aes_ct = '0;
    forever begin
      @(negedge clk);
      if (aes_req) begin
        repeat ($urandom_range(6, 9)) @(negedge clk);
        aes_ct  = aes128(aes_key, aes_pt);
        aes_ack = 1;
        @(negedge clk);
        aes_ack = 0;
      end
    end
  end

  // observe the index order of the multiply cycles
  int order [$];
  bit in_order_seen_shuffled;
  always @(posedge clk)
    if (rst_n && dut.state_q == dut.S_MUL) order.push_back(int'(dut.idx));

  int not_identity;
  task automatic run(input int dd, input bit sh, input bit pp);
    int cyc;
    logic [127:0] exp;
    bit seen [16];
    key = {$urandom, $urandom, $urandom, $urandom};
    nonce = {$urandom, $urandom, $urandom, $urandom};
    order.delete();
    @(negedge clk);
    start = 1; d = 3'(dd); shuffle = sh; post = pp;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp = polymul(key, nonce);
    if (pp) exp = aes128(exp, key) ^ key;
    check(kout == exp, $sformatf("session key d=%0d shuffle=%0d post=%0d", dd, sh, pp));
    if (!pp) check(cyc == 18*(dd+1) + 1, $sformatf("d=%0d took %0d cycles", dd, cyc));
    check(order.size() == 16*(dd+1), "multiply cycles per share");
    for (int s = 0; s <= dd; s++) begin
      bit ident;
      foreach (seen[i]) seen[i] = 0;
      ident = 1;
      for (int i = 0; i < 16; i++) begin
        seen[order[16*s+i]] = 1;
        if (order[16*s+i] != i) ident = 0;
      end
      check(seen.sum() with (int'(item)) == 16, "each index once per share");
      if (sh && !ident) not_identity++;
      if (!sh) check(ident, "no shuffling: natural order");
    end
  endtask

  initial begin
    tb_ref_pkg::init();
    start = 0; key = '0; nonce = '0; d = 0; shuffle = 0; post = 0;
    not_identity = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reference sanity: multiplying by 1 and by y
    check(polymul(128'h0102030405060708090a0b0c0d0e0f10, {8'h01, 120'd0})
          == 128'h0102030405060708090a0b0c0d0e0f10, "reference: times 1");
    check(polymul(128'h0102030405060708090a0b0c0d0e0f10, {8'h00, 8'h01, 112'd0})
          == 128'h100102030405060708090a0b0c0d0e0f, "reference: times y");
    for (int dd = 0; dd <= 4; dd++) begin
      run(dd, 0, 0);
      run(dd, 1, 0);
    end
    run(1, 1, 1);
    run(0, 0, 1);
    run(2, 1, 1);
    check(not_identity > 0, "shuffling changed the order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
