// tcdm_streamer_out: sink streamer between the 128-bit block stream of the
// encryption units and a 32-bit TCDM write port.
//
// After start_i it accepts nblocks_i blocks and writes each as four
// consecutive words from addr_i upwards (bits [127:96] to the lowest
// address). A block is taken only when the previous one has been written,
// so one block is buffered; with a memory that grants every cycle a block
// leaves in 4 cycles. busy_o stays high until the last word was granted;
// write responses are not needed and are ignored. The port only writes
// whole words, so its we and be fields are constant.
// The 32-bit port and the block conversion follow the document; word order
// and handshakes are this design's choices.
module tcdm_streamer_out
  import hwcrypt_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic [31:0]  addr_i,
  input  logic [15:0]  nblocks_i,
  output logic         busy_o,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  logic [127:0] in_data_i,
  output tcdm_req_t    tcdm_req_o,
  input  tcdm_rsp_t    tcdm_rsp_i
);

  logic [31:0]  addr_q;
  logic [15:0]  blocks_left_q;
  logic [127:0] buf_q;
  logic [2:0]   words_q;      // words of buf_q still to write

  assign in_ready_o = (words_q == 3'd0) && (blocks_left_q != '0);
  assign busy_o     = (blocks_left_q != '0) || (words_q != 3'd0);

  always_comb begin
    tcdm_req_o       = '0;
    tcdm_req_o.req   = (words_q != 3'd0);
    tcdm_req_o.add   = addr_q;
    tcdm_req_o.we    = 1'b1;
    tcdm_req_o.be    = 4'hf;
    tcdm_req_o.wdata = buf_q[127:96];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      addr_q        <= '0;
      blocks_left_q <= '0;
      buf_q         <= '0;
      words_q       <= '0;
    end else begin
      if (start_i && !busy_o) begin
        addr_q        <= addr_i;
        blocks_left_q <= nblocks_i;
      end
      if (in_valid_i && in_ready_o) begin
        buf_q         <= in_data_i;
        words_q       <= 3'd4;
        blocks_left_q <= blocks_left_q - 16'd1;
      end else if (tcdm_req_o.req && tcdm_rsp_i.gnt) begin
        buf_q   <= {buf_q[95:0], 32'd0};
        words_q <= words_q - 3'd1;
        addr_q  <= addr_q + 32'd4;
      end
    end
  end

  // r_valid and r_data carry nothing for writes
  logic unused;
  assign unused = tcdm_rsp_i.r_valid ^ (^tcdm_rsp_i.r_data);

endmodule
