// rb_ppgu3: partial product generation unit of structure PS-III.
//
// One AND cell, one XOR cell and two register cells. The cut-set retiming of
// PS-III places a register between the AND cell and the XOR cell, so that
// in one clock cycle a unit multiplies (AND) the digit of the next
// multiplication step while it adds (XOR) the product of the previous one:
//   m_q   <= a_in & b_in              (register cell 1)
//   p_out <= p_in ^ m_q               (register cell 2)
// The critical path is therefore a single AND or XOR gate plus a flip-flop.
//
// Timing: b_in, a_in and tag_in of a digit cycle arrive at the same clock;
// p_in of the same digit cycle must arrive one clock later, and p_out
// appears two clocks after b_in. b_out (rotated by Q places, the S-II
// rewiring) and tag_out leave one clock after b_in, so a chain of units
// keeps this relation from unit to unit. With FIRST = 1 the XOR cell is
// not needed and p_in is ignored.
//
// Which registers PS-III counts as its two register cells is not spelled
// out in detail; this design reads them as the product and the partial sum
// registers, and keeps the operand register on the B line as in PS-I.
module rb_ppgu3
  import rb_pkg::*;
#(
  parameter int unsigned N     = 10,
  parameter int unsigned Q     = 2,
  parameter bit          FIRST = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  b_in,
  input  logic          a_in,
  input  logic [N-1:0]  p_in,
  input  rb_tag_t       tag_in,
  output logic [N-1:0]  b_out,
  output logic [N-1:0]  p_out,
  output rb_tag_t       tag_out
);

  logic [N-1:0] m_q;
  logic [N-1:0] b_next;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) b_next[(i + Q) % N] = b_in[i];
  end

  always_ff @(posedge clk) begin
    m_q   <= b_in & {N{a_in}};              // AND cell
    p_out <= FIRST ? m_q : (p_in ^ m_q);    // XOR cell
    b_out <= b_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_out <= '0;
    else        tag_out <= tag_in;
  end

endmodule
