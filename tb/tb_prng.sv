// tb_prng: self-checking testbench of the PRNG.
// Compares the output sequence with a software xorshift128 generator
// (one 32-bit output per step, four steps per clock), checks that the
// generator holds its value without next_i, that reseeding restarts the
// sequence and that an all-zero seed is replaced.
module tb_prng;
  localparam logic [127:0] SEED = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         seed_valid, next;
  logic [127:0] seed, rnd;

  prng #(.SEED(SEED)) dut (
    .clk_i(clk), .rst_ni(rst_n), .seed_valid_i(seed_valid), .seed_i(seed),
    .next_i(next), .rnd_o(rnd)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // software model: words x, y, z, w
  logic [31:0] x, y, z, w;
  task automatic sw_step();
    logic [31:0] t;
    t = x ^ (x << 11);
    x = y; y = z; z = w;
    w = (w ^ (w >> 19)) ^ (t ^ (t >> 8));
  endtask

  initial begin
    seed_valid = 0; seed = '0; next = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    {x, y, z, w} = SEED;
    @(negedge clk);
    check(rnd == SEED, "reset value");
    for (int i = 0; i < 20; i++) begin
      next = (i % 3 != 2);
      @(negedge clk);
      if (next) repeat (4) sw_step();
      check(rnd == {x, y, z, w}, $sformatf("sequence step %0d", i));
    end
    next = 0;
    seed_valid = 1; seed = 128'hdead_beef_0000_1111_2222_3333_4444_5555;
    @(negedge clk);
    seed_valid = 0;
    {x, y, z, w} = 128'hdead_beef_0000_1111_2222_3333_4444_5555;
    check(rnd == {x, y, z, w}, "reseed");
    next = 1;
    @(negedge clk);
    repeat (4) sw_step();
    check(rnd == {x, y, z, w}, "after reseed");
    next = 0;
    seed_valid = 1; seed = '0;
    @(negedge clk);
    seed_valid = 0;
    check(rnd == SEED, "zero seed replaced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
