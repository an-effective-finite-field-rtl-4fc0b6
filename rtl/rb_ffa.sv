// rb_ffa: finite field accumulator (FFA) of the digit-serial RB multiplier.
//
// N parallel bit-level accumulation cells. Each cycle the partial product
// word arriving from the last PPGU is added (XOR, addition in GF(2)) to the
// value accumulated so far and stored back for the next cycle. On a digit
// cycle tagged `first` the old value is discarded, so consecutive
// multiplications follow each other with no idle cycle. On the cycle tagged
// `last` the complete product is copied to the output register `c` and
// out_valid is high for one clock; c holds its value until the next result.
// Latency: one clock from the last partial product to out_valid.
// The concurrent assertions below are disabled during reset; that use of
// rst_n inside a clocked property is why lint reports rst_n as used both
// asynchronously and synchronously. No flip-flop uses it synchronously.
// The separate output register and the tag handling are choices of this
// design.
module rb_ffa
  import rb_pkg::*;
#(
  parameter int unsigned N = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  p_in,
  input  rb_tag_t       tag_in,
  output logic [N-1:0]  c,
  output logic          out_valid
);

  logic [N-1:0] acc;
  logic [N-1:0] acc_next;

  assign acc_next = (tag_in.first ? '0 : acc) ^ p_in;

  always_ff @(posedge clk) begin
    if (tag_in.valid) acc <= acc_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= tag_in.valid && tag_in.last;
      if (tag_in.valid && tag_in.last) c <= acc_next;
    end
  end

  // first and last are only meaningful on valid digit cycles.
  a_tag: assert property (@(posedge clk) disable iff (!rst_n)
                          (tag_in.first || tag_in.last) |-> tag_in.valid);

endmodule
