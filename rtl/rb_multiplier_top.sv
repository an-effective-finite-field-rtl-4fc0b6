// rb_multiplier_top: the three digit-serial redundant-basis multiplier
// structures side by side.
//
// All three compute the same RB product C = A*B (cyclic convolution of two
// N-bit vectors over GF(2)) with the same throughput of one product per Q
// clocks; they differ in pipeline registers, latency and critical path:
//   index 0: PS-I   (rb_mult_ps1)  latency Q + D + 1, critical path AND + XOR
//   index 1: PS-II  (rb_mult_ps2)  latency Q + ceil(D/2) + 1, half the
//                                  pipeline registers, AND + 2 XOR
//   index 2: PS-III (rb_mult_ps3)  latency Q + D + 2, critical path one gate
// with D = N/Q. They share the operand inputs and handshake, so one pair
// given here is multiplied by all three; each has its own result and
// out_valid. in_ready is the AND of the three (they are equal, since all
// three take one pair per Q clocks). Using a single structure in a design
// means instantiating its rb_mult_ps* module alone; this top is the
// comparison the three structures are offered for.
module rb_multiplier_top #(
  parameter int unsigned N = 10,
  parameter int unsigned Q = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [N-1:0]  c [3],
  output logic [2:0]    out_valid
);

  logic [2:0] ready;

  rb_mult_ps1 #(.N(N), .Q(Q)) u_ps1 (
    .clk, .rst_n, .in_valid(in_valid && in_ready), .in_ready(ready[0]),
    .a, .b, .c(c[0]), .out_valid(out_valid[0])
  );

  rb_mult_ps2 #(.N(N), .Q(Q), .GROUP(2)) u_ps2 (
    .clk, .rst_n, .in_valid(in_valid && in_ready), .in_ready(ready[1]),
    .a, .b, .c(c[1]), .out_valid(out_valid[1])
  );

  rb_mult_ps3 #(.N(N), .Q(Q)) u_ps3 (
    .clk, .rst_n, .in_valid(in_valid && in_ready), .in_ready(ready[2]),
    .a, .b, .c(c[2]), .out_valid(out_valid[2])
  );

  assign in_ready = &ready;

endmodule
