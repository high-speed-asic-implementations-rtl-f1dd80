// tb_keccak_f400: self-checking testbench of the Keccak-p[400] core.
// Random states are permuted for round counts 1..20 and compared with the
// table-driven reference; the run time must be ceil(nr/3) cycles. Also
// checks that a start together with a load permutes the loaded state.
module tb_keccak_f400;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         load, start, busy, done;
  logic [399:0] sin, sout;
  logic [4:0]   nr;

  keccak_f400 dut (
    .clk_i(clk), .rst_ni(rst_n), .load_i(load), .state_i(sin),
    .start_i(start), .nrounds_i(nr), .busy_o(busy), .done_o(done), .state_o(sout)
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

  function automatic logic [399:0] rnd400();
    logic [399:0] r;
    for (int i = 0; i < 13; i++) r = {r[367:0], $urandom};
    return r;
  endfunction

  task automatic run(input logic [399:0] s, input int rounds, input bit separate_load);
    int cyc;
    @(negedge clk);
    if (separate_load) begin
      load = 1; sin = s;
      @(negedge clk);
      load = 0;
      start = 1; nr = 5'(rounds);
    end else begin
      load = 1; start = 1; sin = s; nr = 5'(rounds);
    end
    @(negedge clk);
    load = 0; start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(sout == keccak_p400(s, rounds), $sformatf("p400 %0d rounds", rounds));
    check(cyc == (rounds + 2) / 3, $sformatf("%0d rounds took %0d cycles", rounds, cyc));
  endtask

  initial begin
    load = 0; start = 0; sin = '0; nr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reference sanity: the all-zero state after 20 rounds is not zero and
    // the reference is a permutation step by step
    check(keccak_p400('0, 20) != '0, "reference non-trivial");
    for (int r = 1; r <= 20; r++) run(rnd400(), r, r % 2);
    for (int i = 0; i < 5; i++) run(rnd400(), 12, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
