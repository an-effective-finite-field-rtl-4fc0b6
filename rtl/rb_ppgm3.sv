// rb_ppgm3: partial product generation module of structure PS-III, a
// systolic chain of D = N/Q rb_ppgu3 units.
//
// Unit s receives the operand and its digit bit s clocks after unit 0 (the
// digit bits are delayed here to stagger them) and the partial sum of unit
// s-1 one clock after that, because each unit registers the AND product
// before the XOR. The last partial sum of a digit cycle leaves D+1 clocks
// after the cycle entered; the tag, which travels with the operand, gets
// one extra register so that tag_out is aligned with p_out.
// One digit cycle can enter every clock.
module rb_ppgm3
  import rb_pkg::*;
#(
  parameter int unsigned N  = 10,
  parameter int unsigned Q  = 2,
  localparam int unsigned D = N / Q
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  b_t,
  input  logic [D-1:0]  digit,
  input  rb_tag_t       tag_in,
  output logic [N-1:0]  p_out,
  output rb_tag_t       tag_out
);

  logic [N-1:0] b_s   [D+1];
  logic [N-1:0] p_s   [D+1];
  rb_tag_t      tag_s [D+1];
  logic [D-1:0] dig_d [D];

  assign b_s[0]   = b_t;
  assign p_s[0]   = '0;
  assign tag_s[0] = tag_in;
  assign dig_d[0] = digit;

  for (genvar s = 1; s < D; s++) begin : g_stagger
    always_ff @(posedge clk) dig_d[s] <= dig_d[s-1];
  end

  for (genvar s = 0; s < D; s++) begin : g_unit
    rb_ppgu3 #(.N(N), .Q(Q), .FIRST(s == 0)) u_ppgu (
      .clk     (clk),
      .rst_n   (rst_n),
      .b_in    (b_s[s]),
      .a_in    (dig_d[s][s]),
      .p_in    (p_s[s]),
      .tag_in  (tag_s[s]),
      .b_out   (b_s[s+1]),
      .p_out   (p_s[s+1]),
      .tag_out (tag_s[s+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_out <= '0;
    else        tag_out <= tag_s[D];
  end

  assign p_out = p_s[D];

endmodule
