// keccak_f400: iterative Keccak-p[400, nr] permutation with three rounds in
// the combinational path.
//
// The 400-bit state register sits behind three unrolled Keccak rounds. The
// round constants come from the Keccak LFSR (round constant generator). A
// permutation of nr rounds (1..20) uses round indices 20-nr .. 19, as in
// Keccak-p, and takes ceil(nr/3) cycles: in the last cycle the rounds that
// are not needed are bypassed by the multiplexer after each round.
//
// Interface. load_i writes state_i into the register. start_i with
// nrounds_i starts a permutation, of state_i when load_i is high in the same
// cycle and of the register contents otherwise; busy_o is high while it runs and done_o pulses in the
// cycle after the last rounds were written. state_o is the register.
// Three rounds per cycle and the 20-round maximum follow the document; the
// bypass of unused rounds and the handshake are this design's choices.
module keccak_f400
  import hwcrypt_pkg::*;
(
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         load_i,
  input  logic [399:0] state_i,
  input  logic         start_i,
  input  logic [4:0]   nrounds_i,
  output logic         busy_o,
  output logic         done_o,
  output logic [399:0] state_o
);

  logic [399:0] st_q;
  logic [4:0]   ir_q;    // next round index
  logic         busy_q;

  // Three rounds with bypass: round k runs only while ir_q+k < 20
  logic [399:0] r1, r2, r3;
  always_comb begin
    r1 = keccak_round(st_q, int'(ir_q));
    r2 = (ir_q + 5'd1 < 5'd20) ? keccak_round(r1, int'(ir_q) + 1) : r1;
    r3 = (ir_q + 5'd2 < 5'd20) ? keccak_round(r2, int'(ir_q) + 2) : r2;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q   <= '0;
      ir_q   <= '0;
      busy_q <= 1'b0;
      done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (load_i) st_q <= state_i;
      if (start_i && !busy_q) begin
        // a start in the same cycle as a load permutes the loaded value
        if (nrounds_i == 5'd0) begin
          done_o <= 1'b1;
        end else begin
          ir_q   <= 5'd20 - ((nrounds_i > 5'd20) ? 5'd20 : nrounds_i);
          busy_q <= 1'b1;
        end
      end else if (busy_q && !load_i) begin
        st_q <= r3;
        ir_q <= ir_q + 5'd3;
        if (ir_q >= 5'd17) begin
          busy_q <= 1'b0;
          done_o <= 1'b1;
        end
      end
    end
  end

  assign busy_o  = busy_q;
  assign state_o = st_q;

endmodule
