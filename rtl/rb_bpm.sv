// rb_bpm: bit-permutation module (BPM) of the digit-serial RB multiplier.
//
// In the redundant basis a field element is an N-bit vector and the product
// C = A*B is the cyclic convolution c_k = XOR_i a_i & b_((k-i) mod N), i.e.
// C = XOR_i a_i * B^(i), where B^(i) is B cyclically rotated by i places
// towards the higher indices. The N bits of A are split into D = N/Q
// groups of Q bits; group j holds a_(jQ) .. a_(jQ+Q-1) and feeds PPGU j.
//
// This module captures one operand pair and then, for Q digit cycles
// t = 0 .. Q-1, presents
//   b_t      = B^(t): the S-I node of the signal flow graph, a register
//              that is rotated by one place per cycle (a loop, no logic
//              other than wiring and the load multiplexer), and
//   digit[j] = a_(jQ+t): one bit of every group, taken from a register
//              whose groups shift down by one place per cycle.
// The fixed rotations by multiples of Q (the S-II nodes) are applied in the
// PPGUs as wiring.
//
// Interface: a new pair (a, b) is taken on a clock edge where in_valid and
// in_ready are both high. in_ready is high when the module is idle or in
// the last digit cycle, so multiplications can follow each other with no
// gap: one multiplication per Q cycles. The outputs are registered; the
// digit cycle t = 0 of a pair taken at edge k is presented in the cycle
// after edge k. `tag` marks valid, first and last cycles.
//
// The concurrent assertions below are disabled during reset; that use of
// rst_n inside a clocked property is why lint reports rst_n as used both
// asynchronously and synchronously. No flip-flop uses it synchronously.
// The register organisation (rotating B register and shifting A groups)
// and the valid/ready handshake are choices of this design.
module rb_bpm
  import rb_pkg::*;
#(
  parameter int unsigned N = 10,  // operand width (RB size)
  parameter int unsigned Q = 2,   // digit cycles per multiplication
  localparam int unsigned D = N / Q
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [N-1:0]  b_t,
  output logic [D-1:0]  digit,
  output rb_tag_t       tag
);

  localparam int unsigned TW = (Q > 1) ? $clog2(Q) : 1;

  logic          busy;
  logic [TW-1:0] t;
  logic [N-1:0]  a_q;
  logic [N-1:0]  b_q;
  logic          last_cycle;
  logic [N-1:0]  b_rot1;
  logic [N-1:0]  a_shift;

  assign last_cycle = (t == TW'(Q - 1));
  assign in_ready   = !busy || last_cycle;

  // S-I: rotate B by one place.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) b_rot1[(i + 1) % N] = b_q[i];
  end

  // Every group of A moves down by one place; the vacated top bit is 0.
  always_comb begin
    for (int unsigned j = 0; j < D; j++) begin
      for (int unsigned k = 0; k < Q; k++) begin
        a_shift[j*Q + k] = (k + 1 < Q) ? a_q[j*Q + k + 1] : 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      t    <= '0;
    end else if (in_valid && in_ready) begin
      busy <= 1'b1;
      t    <= '0;
    end else if (busy) begin
      busy <= !last_cycle;
      t    <= last_cycle ? '0 : t + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      a_q <= a;
      b_q <= b;
    end else if (busy) begin
      a_q <= a_shift;
      b_q <= b_rot1;
    end
  end

  assign b_t = b_q;
  always_comb begin
    for (int unsigned j = 0; j < D; j++) digit[j] = a_q[j*Q];
  end

  assign tag = '{valid: busy, first: busy && (t == '0), last: busy && last_cycle};

  initial begin
    assert (N % Q == 0) else $error("rb_bpm: N must be a multiple of Q");
  end

  // An accepted pair starts its first digit cycle on the next clock, and
  // every digit cycle after the first follows the previous one directly.
  a_start: assert property (@(posedge clk) disable iff (!rst_n)
                            in_valid && in_ready |=> tag.valid && tag.first);
  a_run:   assert property (@(posedge clk) disable iff (!rst_n)
                            tag.valid && !tag.last |=> tag.valid && !tag.first);

endmodule
