// tb_aes_unit: self-checking testbench of the AES unit.
// Checks single encryptions against FIPS-197 and an independent AES model,
// the 2PRG stream (pads and key chain) against the reference, the 6-cycle
// block time with an always-valid input, correct results under random input
// stalls and output back-pressure, and the direct AES-round mode.
module tb_aes_unit;
  import hwcrypt_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [127:0] CA = 128'h0;
  localparam logic [127:0] CB = 128'h1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done;
  mode_e        mode;
  logic [127:0] key;
  logic [15:0]  nblocks;
  logic         in_valid, in_ready, out_valid, out_ready;
  logic [127:0] in_data, out_data;
  logic         ecb_req, ecb_ack;
  logic [127:0] ecb_key, ecb_pt, ecb_ct;

  aes_unit #(.C_A(CA), .C_B(CB)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .start_i(start), .mode_i(mode), .key_i(key), .nblocks_i(nblocks),
    .busy_o(busy), .done_o(done),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_data_i(in_data),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_data_o(out_data),
    .ecb_req_i(ecb_req), .ecb_key_i(ecb_key), .ecb_pt_i(ecb_pt),
    .ecb_ack_o(ecb_ack), .ecb_ct_o(ecb_ct)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ecb(input logic [127:0] k, input logic [127:0] p, output logic [127:0] c);
    @(negedge clk);
    ecb_req = 1; ecb_key = k; ecb_pt = p;
    @(negedge clk);
    ecb_req = 0;
    while (!ecb_ack) @(negedge clk);
    c = ecb_ct;
  endtask

  // run a stream job; stall_pct: chance of in_valid / out_ready being low
  task automatic stream(input mode_e m, input logic [127:0] k, input int n,
                        input int stall_pct, input bit check_rate);
    logic [127:0] pin [];
    logic [127:0] exp [];
    logic [127:0] kk;
    int ni, no, last_out, gaps_bad;
    pin = new[n];
    exp = new[n];
    kk = k;
    for (int i = 0; i < n; i++) begin
      pin[i] = {$urandom, $urandom, $urandom, $urandom};
      if (m == MODE_PRG) begin
        exp[i] = pin[i] ^ aes128(kk, CB);
        kk = aes128(kk, CA);
      end else begin
        exp[i] = aes_one_round(pin[i], k);
      end
    end
    @(negedge clk);
    start = 1; mode = m; key = k; nblocks = 16'(n);
    @(negedge clk);
    start = 0;
    ni = 0; no = 0; last_out = -1; gaps_bad = 0;
    while (no < n) begin
      in_valid  = (ni < n) && ($urandom_range(99) >= stall_pct);
      in_data   = (ni < n) ? pin[ni] : '0;
      out_ready = ($urandom_range(99) >= stall_pct);
      @(posedge clk);
      if (in_valid && in_ready) ni++;
      if (out_valid && out_ready) begin
        check(out_data == exp[no], $sformatf("mode %0d block %0d", m, no));
        if (check_rate && last_out >= 0 && cycle - last_out != 6) gaps_bad++;
        last_out = cycle;
        no++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    if (check_rate) check(gaps_bad == 0, "2PRG produces one block every 6 cycles");
    while (busy) @(negedge clk);
  endtask

  logic [127:0] c;
  initial begin
    tb_ref_pkg::init();
    start = 0; mode = MODE_PRG; key = '0; nblocks = '0;
    in_valid = 0; in_data = '0; out_ready = 1;
    ecb_req = 0; ecb_key = '0; ecb_pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 appendix C.1 and B
    check(aes128(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
          == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference model C.1");
    ecb(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, c);
    check(c == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "ECB FIPS-197 C.1");
    ecb(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, c);
    check(c == 128'h3925841d02dc09fbdc118597196a0b32, "ECB FIPS-197 B");
    for (int i = 0; i < 4; i++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      ecb(k, p, c);
      check(c == aes128(k, p), "ECB random");
    end
    stream(MODE_PRG, {$urandom, $urandom, $urandom, $urandom}, 8, 0, 1);
    stream(MODE_PRG, {$urandom, $urandom, $urandom, $urandom}, 10, 40, 0);
    stream(MODE_AES_ROUND, {$urandom, $urandom, $urandom, $urandom}, 6, 30, 0);
    stream(MODE_PRG, {$urandom, $urandom, $urandom, $urandom}, 1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
