// tb_sponge_unit: self-checking testbench of the ISAP sponge unit.
// Each mode is compared with the software ISAP model of tb_ref_pkg:
// ISAP encryption at a 128-bit rate (and its 5-cycle block time) and at
// smaller rates with stalls, ISAP MAC over several blocks and over none,
// ISAPRK alone with a 144-bit input absorbed one bit at a time (and its
// cycle count), and the low-level permutation mode.
module tb_sponge_unit;
  import hwcrypt_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, iv, ir, ov, ordy;
  mode_e        mode;
  logic [127:0] key, nonce, id, od;
  logic [15:0]  ext, nb;
  logic [4:0]   sk, sb, se, sh;
  logic [2:0]   rbl, rdl;
  logic [7:0]   ybits;

  sponge_unit dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .mode_i(mode), .key_i(key),
    .nonce_i(nonce), .nonce_ext_i(ext), .nblocks_i(nb),
    .s_k_i(sk), .s_b_i(sb), .s_e_i(se), .s_h_i(sh),
    .rk_rate_log_i(rbl), .data_rate_log_i(rdl), .rk_bits_i(ybits),
    .busy_o(busy), .done_o(done),
    .in_valid_i(iv), .in_ready_o(ir), .in_data_i(id),
    .out_valid_o(ov), .out_ready_i(ordy), .out_data_o(od)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle++;

  isap_cfg_t c;
  int last_cycles;
  int out_gap_bad;

  // run one job: feeds nin blocks, collects nout blocks
  task automatic job(input mode_e m, input int n, ref logic [127:0] din [],
                     input int nout, output logic [127:0] dout [], input int stall_pct,
                     input bit rate);
    int ni, no, t0, last;
    dout = new[nout];
    @(negedge clk);
    start = 1; mode = m; nb = 16'(n);
    sk = 5'(c.sk); sb = 5'(c.sb); se = 5'(c.se); sh = 5'(c.sh);
    rbl = 3'($clog2(c.rb)); rdl = 3'($clog2(c.rd)); ybits = 8'(c.ybits);
    t0 = cycle;
    @(negedge clk);
    start = 0;
    ni = 0; no = 0; last = -1; out_gap_bad = 0;
    while (no < nout) begin
      iv   = (ni < din.size()) && ($urandom_range(99) >= stall_pct);
      id   = (ni < din.size()) ? din[ni] : '0;
      ordy = ($urandom_range(99) >= stall_pct);
      @(posedge clk);
      if (iv && ir) ni++;
      if (ov && ordy) begin
        dout[no] = od;
        if (rate && last >= 0 && cycle - last != 5) out_gap_bad++;
        last = cycle;
        no++;
      end
      @(negedge clk);
    end
    iv = 0;
    while (busy) @(negedge clk);
    last_cycles = last - t0;
    check(ni == din.size(), "all input consumed");
  endtask

  logic [127:0] din [];
  logic [127:0] dout [];
  logic [127:0] exp [];
  logic [127:0] none [];
  logic [399:0] ks;

  task automatic rand_data(input int n);
    din = new[n];
    foreach (din[i]) din[i] = {$urandom, $urandom, $urandom, $urandom};
  endtask

  initial begin
    start = 0; mode = MODE_ISAP_ENC; key = '0; nonce = '0; ext = '0; nb = '0;
    sk = 12; sb = 12; se = 12; sh = 20; rbl = 0; rdl = 7; ybits = 128;
    iv = 0; id = '0; ordy = 1;
    none = new[0];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ISAP encryption, 128-bit rate, no stalls
    c = '{sk: 12, sb: 12, se: 12, sh: 20, rb: 1, rd: 128, ybits: 128};
    key = {$urandom, $urandom, $urandom, $urandom};
    nonce = {$urandom, $urandom, $urandom, $urandom};
    rand_data(6);
    isap_enc(key, nonce, c, din, exp);
    job(MODE_ISAP_ENC, 6, din, 6, dout, 0, 1);
    foreach (exp[i]) check(dout[i] == exp[i], $sformatf("ENC block %0d", i));
    check(out_gap_bad == 0, "ENC one block every 5 cycles");

    // decryption is the same operation
    job(MODE_ISAP_ENC, 6, dout, 6, exp, 20, 0);
    foreach (exp[i]) check(exp[i] == din[i], $sformatf("ENC round trip block %0d", i));

    // smaller rates, fewer rounds, stalls
    c = '{sk: 6, sb: 1, se: 4, sh: 8, rb: 4, rd: 32, ybits: 100};
    rand_data(3);
    isap_enc(key, nonce, c, din, exp);
    job(MODE_ISAP_ENC, 3, din, 3, dout, 30, 0);
    foreach (exp[i]) check(dout[i] == exp[i], $sformatf("ENC r=32 block %0d", i));

    // MAC
    c = '{sk: 12, sb: 12, se: 12, sh: 20, rb: 1, rd: 128, ybits: 128};
    rand_data(4);
    job(MODE_ISAP_MAC, 4, din, 1, dout, 20, 0);
    check(dout[0] == isap_mac(key, nonce, c, din), "MAC 4 blocks");
    c = '{sk: 3, sb: 2, se: 3, sh: 5, rb: 8, rd: 64, ybits: 144};
    rand_data(2);
    job(MODE_ISAP_MAC, 2, din, 1, dout, 0, 0);
    check(dout[0] == isap_mac(key, nonce, c, din), "MAC r=64, 144-bit y");
    job(MODE_ISAP_MAC, 0, none, 1, dout, 0, 0);
    check(dout[0] == isap_mac(key, nonce, c, none), "MAC empty message");

    // ISAPRK alone, 144-bit input, one bit per permutation
    c = '{sk: 12, sb: 12, se: 12, sh: 20, rb: 1, rd: 128, ybits: 144};
    ext = 16'($urandom);
    job(MODE_ISAP_RK, 0, none, 1, dout, 0, 0);
    ks = isap_rk(key, 2, {nonce, ext}, c);
    check(dout[0] == ks[399:272], "ISAPRK 144 bits");
    // p^12 (4 cycles), 144 x (absorb + 4 cycles), start, result, output
    check(last_cycles == 4 + 144*5 + 3, $sformatf("ISAPRK took %0d cycles", last_cycles));

    // low-level permutation
    c.sh = 20;
    rand_data(4);
    job(MODE_KECCAK, 4, din, 4, dout, 10, 0);
    ks = keccak_p400({din[0], din[1], din[2], din[3][127:112]}, 20);
    check({dout[0], dout[1], dout[2], dout[3][127:112]} == ks, "Keccak-p[400] access");
    check(dout[3][111:0] == '0, "unused bits zero");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
