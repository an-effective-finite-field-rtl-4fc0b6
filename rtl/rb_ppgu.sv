// rb_ppgu: partial product generation unit (PPGU) for structures PS-I and
// PS-II of the digit-serial RB multiplier.
//
// The unit holds G pairs of an AND cell and an XOR cell followed by one
// register cell. Cell k works on the operand copy rotated by k*Q places
// (the S-II rewiring, free in hardware) and one digit bit a_in[k]:
//   p_out <= p_in XOR (a_in[0] & B) XOR (a_in[1] & B^(Q)) XOR ...
// G = 1 gives the PPGU of PS-I (M node, A node and the delay placed by the
// cut-set retiming). G = 2 gives the merged PPGU of PS-II, with two AND
// cells and two XOR cells; larger G extends PS-II to fewer register stages.
// With FIRST = 1 the unit starts the chain and p_in is ignored, so it needs
// one XOR cell fewer.
//
// The operand is passed on, registered and rotated by G*Q places, to the
// next unit (the register on the B line that the cut-set places between
// two units), together with the tag. All outputs appear one clock after the
// inputs. Only the tag is reset.
module rb_ppgu
  import rb_pkg::*;
#(
  parameter int unsigned N     = 10,  // operand width
  parameter int unsigned Q     = 2,   // rotation between neighbouring cells
  parameter int unsigned G     = 1,   // AND/XOR cell pairs in this unit
  parameter bit          FIRST = 1'b0 // first unit of the chain: no p_in
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  b_in,
  input  logic [G-1:0]  a_in,
  input  logic [N-1:0]  p_in,
  input  rb_tag_t       tag_in,
  output logic [N-1:0]  b_out,
  output logic [N-1:0]  p_out,
  output rb_tag_t       tag_out
);

  logic [N-1:0] b_cell [G];   // operand seen by cell k: B rotated by k*Q
  logic [N-1:0] sum;
  logic [N-1:0] b_next;

  always_comb begin
    for (int unsigned k = 0; k < G; k++) begin
      for (int unsigned i = 0; i < N; i++) b_cell[k][(i + k*Q) % N] = b_in[i];
    end
    for (int unsigned i = 0; i < N; i++) b_next[(i + G*Q) % N] = b_in[i];
  end

  // AND cells and XOR cells.
  always_comb begin
    sum = FIRST ? '0 : p_in;
    for (int unsigned k = 0; k < G; k++) sum = sum ^ (b_cell[k] & {N{a_in[k]}});
  end

  // Register cells.
  always_ff @(posedge clk) begin
    p_out <= sum;
    b_out <= b_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_out <= '0;
    else        tag_out <= tag_in;
  end

endmodule
