// rb_mult_ps1: digit-serial redundant-basis (RB) multiplier, structure PS-I.
//
// Computes the RB product C = A*B of two N-bit vectors, the cyclic
// convolution c_k = XOR_i a_i & b_((k-i) mod N) (multiplication in
// GF(2)[x]/(x^N + 1), into which the field GF(2^m) is embedded by the
// redundant basis). A is consumed as Q digits of D = N/Q bits; B is rotated
// by one place per digit cycle. Three modules:
//   rb_bpm  - bit-permutation module: operand registers, S-I rotation,
//   rb_ppgm - partial product generation module: D PPGUs (AND cell, XOR
//             cell, register cell each) in a systolic chain with staggered
//             digit inputs,
//   rb_ffa  - finite field accumulator summing the Q partial products.
// Critical path: one AND gate and one XOR gate.
//
// Interface: a pair (a, b) is taken on a clock edge with in_valid and
// in_ready high; one pair per Q clocks, back to back. The product appears on
// c with a one-clock out_valid pulse Q + D + 1 clocks after the accepting
// edge, and c holds it until the next result. Active-low asynchronous reset.
// The organisation follows the described PS-I; the handshake, the latency
// figure and the default sizes (N = 10, Q = 2) are this design's choices.
module rb_mult_ps1
  import rb_pkg::*;
#(
  parameter int unsigned N = 10,
  parameter int unsigned Q = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [N-1:0]  c,
  output logic          out_valid
);

  localparam int unsigned D = N / Q;

  logic [N-1:0] b_t;
  logic [D-1:0] digit;
  rb_tag_t      tag_bpm;
  logic [N-1:0] p;
  rb_tag_t      tag_p;

  rb_bpm #(.N(N), .Q(Q)) u_bpm (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b,
    .b_t, .digit, .tag(tag_bpm)
  );

  rb_ppgm #(.N(N), .Q(Q), .GROUP(1)) u_ppgm (
    .clk, .rst_n, .b_t, .digit, .tag_in(tag_bpm),
    .p_out(p), .tag_out(tag_p)
  );

  rb_ffa #(.N(N)) u_ffa (
    .clk, .rst_n, .p_in(p), .tag_in(tag_p), .c, .out_valid
  );

endmodule
