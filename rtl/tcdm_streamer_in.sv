// tcdm_streamer_in: source streamer between a 32-bit TCDM read port and
// the 128-bit block stream of the encryption units.
//
// After start_i it reads 4*nblocks_i consecutive words from addr_i upwards,
// packs every four words into one block (the word at the lowest address in
// bits [127:96]) and offers the blocks on a valid/ready stream through a
// FIFO of FIFO_DEPTH blocks. A request is issued only while the FIFO, the
// words in flight and the partly packed block leave room for it, so the
// memory never has to hold back a response. Responses are taken in request
// order, one or more cycles after the grant. With a memory that grants
// every cycle the streamer delivers one block every 4 cycles. The port only
// reads, so its we, be and wdata fields are constant (0, 4'b1111, 0).
// The 32-bit port and the 32-to-128-bit conversion follow the document; the
// word order, the FIFO and the request/grant protocol details are this
// design's choices.
module tcdm_streamer_in
  import hwcrypt_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic [31:0]  addr_i,
  input  logic [15:0]  nblocks_i,
  output logic         busy_o,
  output tcdm_req_t    tcdm_req_o,
  input  tcdm_rsp_t    tcdm_rsp_i,
  output logic         out_valid_o,
  input  logic         out_ready_i,
  output logic [127:0] out_data_o
);

  localparam int unsigned CW = $clog2(4*FIFO_DEPTH + 1);

  logic [31:0]  addr_q;
  logic [17:0]  words_left_q;   // words still to request
  logic [17:0]  blocks_left_q;  // blocks still to hand out
  logic [CW-1:0] space_q;       // words that may still be requested
  logic [95:0]  pack_q;
  logic [1:0]   wcnt_q;

  // block FIFO
  logic [127:0] fifo_q [FIFO_DEPTH];
  logic [$clog2(FIFO_DEPTH+1)-1:0] cnt_q;
  logic [$clog2(FIFO_DEPTH)-1:0]   rd_q, wr_q;

  logic issue, grant, push, pop;
  assign issue = (words_left_q != '0) && (space_q != '0);
  assign grant = issue && tcdm_rsp_i.gnt;
  assign push  = tcdm_rsp_i.r_valid && (wcnt_q == 2'd3);
  assign pop   = out_valid_o && out_ready_i;

  always_comb begin
    tcdm_req_o       = '0;
    tcdm_req_o.req   = issue;
    tcdm_req_o.add   = addr_q;
    tcdm_req_o.we    = 1'b0;
    tcdm_req_o.be    = 4'hf;
  end

  assign out_valid_o = (cnt_q != '0);
  assign out_data_o  = fifo_q[rd_q];
  assign busy_o      = (blocks_left_q != '0);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      addr_q        <= '0;
      words_left_q  <= '0;
      blocks_left_q <= '0;
      space_q       <= CW'(4*FIFO_DEPTH);
      pack_q        <= '0;
      wcnt_q        <= '0;
      cnt_q         <= '0;
      rd_q          <= '0;
      wr_q          <= '0;
      for (int i = 0; i < int'(FIFO_DEPTH); i++) fifo_q[i] <= '0;
    end else begin
      if (start_i && !busy_o) begin
        addr_q        <= addr_i;
        words_left_q  <= {nblocks_i, 2'b00};
        blocks_left_q <= {2'b00, nblocks_i};
      end else if (grant) begin
        addr_q       <= addr_q + 32'd4;
        words_left_q <= words_left_q - 18'd1;
      end
      space_q <= space_q - CW'(grant) + (pop ? CW'(4) : CW'(0));
      if (tcdm_rsp_i.r_valid) begin
        wcnt_q <= wcnt_q + 2'd1;
        pack_q <= {pack_q[63:0], tcdm_rsp_i.r_data};
      end
      if (push) begin
        fifo_q[wr_q] <= {pack_q, tcdm_rsp_i.r_data};
        wr_q <= (wr_q == ($clog2(FIFO_DEPTH))'(FIFO_DEPTH - 1)) ? '0 : wr_q + 1'b1;
      end
      if (pop) begin
        rd_q <= (rd_q == ($clog2(FIFO_DEPTH))'(FIFO_DEPTH - 1)) ? '0 : rd_q + 1'b1;
        blocks_left_q <= blocks_left_q - 18'd1;
      end
      cnt_q <= cnt_q + ($bits(cnt_q))'(push) - ($bits(cnt_q))'(pop);
    end
  end

  assert property (@(posedge clk_i) disable iff (!rst_ni) push |-> (32'(cnt_q) < FIFO_DEPTH) || pop);

endmodule
