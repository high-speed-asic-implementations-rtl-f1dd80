// cmd_queue: command queue of HWCRYPT, a FIFO of pending job
// configurations.
//
// The processors fill the configuration registers and push a job while the
// accelerator may still be busy; the controller pops the next job as soon
// as the current one ends. DEPTH entries (five in the document) are held
// as a circular buffer with read and write pointers and an entry count. A
// push to a full queue is dropped and flagged on overflow_o for one cycle;
// pop on an empty queue does nothing. head_o is the oldest entry and is
// valid whenever empty_o is low. The depth follows the document; the
// overflow behaviour is this design's choice.
module cmd_queue
  import hwcrypt_pkg::*;
#(
  parameter int unsigned DEPTH = 5
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     push_i,
  input  job_cfg_t data_i,
  input  logic     pop_i,
  output job_cfg_t head_o,
  output logic     empty_o,
  output logic     full_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o,
  output logic     overflow_o
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  job_cfg_t           mem_q [DEPTH];
  logic [PW-1:0]      rd_q, wr_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  logic do_push, do_pop;
  assign empty_o = (cnt_q == '0);
  assign full_o  = (cnt_q == ($clog2(DEPTH+1))'(DEPTH));
  assign do_pop  = pop_i && !empty_o;
  assign do_push = push_i && (!full_o || do_pop);
  assign head_o  = mem_q[rd_q];
  assign count_o = cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_q       <= '0;
      wr_q       <= '0;
      cnt_q      <= '0;
      overflow_o <= 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) mem_q[i] <= '0;
    end else begin
      overflow_o <= push_i && !do_push;
      if (do_push) begin
        mem_q[wr_q] <= data_i;
        wr_q <= (wr_q == PW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      end
      if (do_pop) rd_q <= (rd_q == PW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q + ($bits(cnt_q))'(do_push) - ($bits(cnt_q))'(do_pop);
    end
  end

endmodule
