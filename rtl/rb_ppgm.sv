// rb_ppgm: partial product generation module (PPGM) of structures PS-I and
// PS-II: a systolic chain of PPGUs.
//
// The D = N/Q digit bits of one digit cycle are split over S = ceil(D/GROUP)
// units; unit s handles the bits s*GROUP .. s*GROUP+GROUP-1 (the last unit
// may hold fewer). Between units sit the register cells placed by the
// feed-forward cut-set retiming, on the B line and on the partial sum line
// alike, so the critical path is one unit (GROUP AND/XOR levels), not the
// whole chain. Because unit s sees a digit cycle s clocks after unit 0, the
// digit bits it needs are delayed by s clocks here (the staggered operand
// input of a systolic array).
//
// GROUP = 1 is PS-I; GROUP = 2 is PS-II, where two neighbouring PPGUs are
// merged into one and share one register stage.
//
// Timing: the partial sum of digit cycle t leaves S clocks after b_t and
// digit of that cycle entered; tag_out is aligned with it. One digit cycle
// can enter every clock.
module rb_ppgm
  import rb_pkg::*;
#(
  parameter int unsigned N     = 10,
  parameter int unsigned Q     = 2,
  parameter int unsigned GROUP = 1,
  localparam int unsigned D    = N / Q,
  localparam int unsigned S    = (D + GROUP - 1) / GROUP
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  b_t,
  input  logic [D-1:0]  digit,
  input  rb_tag_t       tag_in,
  output logic [N-1:0]  p_out,
  output rb_tag_t       tag_out
);

  logic [N-1:0] b_s   [S+1];
  logic [N-1:0] p_s   [S+1];
  rb_tag_t      tag_s [S+1];
  logic [D-1:0] dig_d [S];    // digit delayed by s clocks

  assign b_s[0]   = b_t;
  assign p_s[0]   = '0;
  assign tag_s[0] = tag_in;
  assign dig_d[0] = digit;

  for (genvar s = 1; s < S; s++) begin : g_stagger
    always_ff @(posedge clk) dig_d[s] <= dig_d[s-1];
  end

  for (genvar s = 0; s < S; s++) begin : g_unit
    localparam int unsigned LO = s * GROUP;
    localparam int unsigned GS = (D - LO < GROUP) ? D - LO : GROUP;
    rb_ppgu #(.N(N), .Q(Q), .G(GS), .FIRST(s == 0)) u_ppgu (
      .clk     (clk),
      .rst_n   (rst_n),
      .b_in    (b_s[s]),
      .a_in    (dig_d[s][LO +: GS]),
      .p_in    (p_s[s]),
      .tag_in  (tag_s[s]),
      .b_out   (b_s[s+1]),
      .p_out   (p_s[s+1]),
      .tag_out (tag_s[s+1])
    );
  end

  assign p_out   = p_s[S];
  assign tag_out = tag_s[S];

endmodule
