// prng: pseudo-random number generator shared by the masking and the
// shuffling of the polynomial re-keying unit.
//
// The generator is xorshift128 (Marsaglia), four steps unrolled per clock
// so that every cycle with next_i high yields 128 fresh bits on rnd_o.
// seed_valid_i loads a new 128-bit seed (an all-zero seed is replaced by a
// fixed non-zero constant, since zero is a fixed point). The document only
// says that a shared pseudo-random generator exists and that its security
// is out of scope; the algorithm, width and seeding are this design's
// choices. rnd_o is the register value, valid in the same cycle as next_i.
module prng #(
  parameter logic [127:0] SEED = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         seed_valid_i,
  input  logic [127:0] seed_i,
  input  logic         next_i,
  output logic [127:0] rnd_o
);

  // one xorshift128 step on the word vector {x, y, z, w}
  function automatic logic [127:0] xs_step(input logic [127:0] s);
    logic [31:0] x, y, z, w, t;
    x = s[127:96]; y = s[95:64]; z = s[63:32]; w = s[31:0];
    t = x ^ (x << 11);
    x = y; y = z; z = w;
    w = w ^ (w >> 19) ^ t ^ (t >> 8);
    return {x, y, z, w};
  endfunction

  logic [127:0] st_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q <= SEED;
    end else if (seed_valid_i) begin
      st_q <= (seed_i == '0) ? SEED : seed_i;
    end else if (next_i) begin
      st_q <= xs_step(xs_step(xs_step(xs_step(st_q))));
    end
  end

  assign rnd_o = st_q;

endmodule
