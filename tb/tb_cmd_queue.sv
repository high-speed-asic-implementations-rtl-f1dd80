// tb_cmd_queue: self-checking testbench of the command queue.
// Fills the five entries, checks full and the overflow flag on a sixth
// push, checks first-in first-out order, a push and a pop in the same cycle
// on a full queue, and random push/pop traffic against a software queue.
module tb_cmd_queue;
  import hwcrypt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     push, pop, empty, full, ovf;
  job_cfg_t din, head;
  logic [2:0] count;

  cmd_queue #(.DEPTH(5)) dut (
    .clk_i(clk), .rst_ni(rst_n), .push_i(push), .data_i(din), .pop_i(pop),
    .head_o(head), .empty_o(empty), .full_o(full), .count_o(count), .overflow_o(ovf)
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

  job_cfg_t model [$];
  function automatic job_cfg_t rjob();
    job_cfg_t j;
    j = '0;
    j.src = $urandom; j.dst = $urandom; j.nblocks = 16'($urandom);
    j.key = {$urandom, $urandom, $urandom, $urandom};
    j.mode = mode_e'($urandom_range(6));
    return j;
  endfunction

  task automatic cyc(input bit pu, input bit po);
    bit exp_ovf;
    push = pu; pop = po; din = rjob();
    exp_ovf = pu && model.size() == 5 && !po;
    @(negedge clk);
    if (po && model.size() > 0) void'(model.pop_front());
    if (pu && !exp_ovf) model.push_back(din);
    check(ovf == exp_ovf, "overflow flag");
    push = 0; pop = 0;
    check(32'(count) == model.size(), "count");
    check(empty == (model.size() == 0) && full == (model.size() == 5), "flags");
    if (model.size() > 0) check(head == model[0], "head");
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    for (int i = 0; i < 5; i++) cyc(1, 0);
    check(full, "full after five pushes");
    cyc(1, 0);                       // dropped
    cyc(1, 1);                       // push and pop while full
    for (int i = 0; i < 5; i++) cyc(0, 1);
    check(empty, "empty again");
    cyc(0, 1);                       // pop on empty
    for (int i = 0; i < 200; i++) cyc($urandom_range(1), $urandom_range(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
