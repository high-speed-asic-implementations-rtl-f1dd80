// tcdm_mem: behavioural model of the cluster's shared data memory (TCDM)
// as seen by HWCRYPT: one word array with two 32-bit ports. Each port
// grants a request in the same cycle, unless a random stall (stall_pct,
// initially STALL_PCT, percent of the cycles) withholds the grant, and returns read data on
// r_valid one cycle after the grant. Writes honour the byte enables.
// Not synthesizable design content: a model for testbenches only.
module tcdm_mem
  import hwcrypt_pkg::*;
#(
  parameter int WORDS     = 4096,
  parameter int STALL_PCT = 0
) (
  input  logic      clk_i,
  input  tcdm_req_t req_i [2],
  output tcdm_rsp_t rsp_o [2],
  output int        stalls_o
);
  logic [31:0] mem [WORDS];
  logic        gnt [2];
  int          stalls = 0;
  int          stall_pct = STALL_PCT;   // may be changed by a testbench

  always_comb
    for (int p = 0; p < 2; p++) begin
      rsp_o[p].gnt = req_i[p].req && gnt[p];
    end

  initial for (int p = 0; p < 2; p++) begin
    gnt[p] = 1;
    rsp_o[p].r_valid = 0;
    rsp_o[p].r_data  = '0;
  end

  always @(posedge clk_i) begin
    for (int p = 0; p < 2; p++) begin
      rsp_o[p].r_valid <= 1'b0;
      if (req_i[p].req && gnt[p]) begin
        if (req_i[p].we) begin
          for (int b = 0; b < 4; b++)
            if (req_i[p].be[b]) mem[(req_i[p].add >> 2) % WORDS][8*b +: 8] <= req_i[p].wdata[8*b +: 8];
        end else begin
          rsp_o[p].r_valid <= 1'b1;
          rsp_o[p].r_data  <= mem[(req_i[p].add >> 2) % WORDS];
        end
      end
      if (req_i[p].req && !gnt[p]) stalls++;
      gnt[p] <= ($urandom_range(99) >= stall_pct);
    end
  end
  assign stalls_o = stalls;
endmodule
