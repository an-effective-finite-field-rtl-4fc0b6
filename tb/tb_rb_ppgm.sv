// tb_rb_ppgm: self-checking test of the PS-I / PS-II partial product
// generation module. Three instances, GROUP = 1 (PS-I, S = D stages) and
// GROUP = 2 (PS-II, S = ceil(D/2) stages, last merged unit half full), and
// GROUP = 3 (PS-II extended to three units per register stage), get
// a new random digit cycle (b_t, digit, tag) every clock. S clocks later
// each must output
//   p = XOR over j of digit[j] & (b_t rotated by j*Q places)
// with the tag of that digit cycle.
module tb_rb_ppgm;
  import rb_pkg::*;
  import tb_rb_ref_pkg::*;

  localparam int N = 10;
  localparam int Q = 2;
  localparam int D = N / Q;
  localparam int S1 = D;
  localparam int S2 = (D + 1) / 2;
  localparam int S3 = (D + 2) / 3;
  localparam int NV = 600;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] b_t, p1, p2, p3;
  logic [D-1:0] digit;
  rb_tag_t tag_in, t1, t2, t3;
  int checks = 0, failures = 0;

  logic [N-1:0] vb [NV];
  logic [D-1:0] vd [NV];
  rb_tag_t      vt [NV];

  rb_ppgm #(.N(N), .Q(Q), .GROUP(1)) u1 (.clk, .rst_n, .b_t, .digit, .tag_in, .p_out(p1), .tag_out(t1));
  rb_ppgm #(.N(N), .Q(Q), .GROUP(2)) u2 (.clk, .rst_n, .b_t, .digit, .tag_in, .p_out(p2), .tag_out(t2));
  rb_ppgm #(.N(N), .Q(Q), .GROUP(3)) u3 (.clk, .rst_n, .b_t, .digit, .tag_in, .p_out(p3), .tag_out(t3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [N-1:0] expect_p(input int i);
    vec_t r = '0;
    for (int j = 0; j < D; j++)
      if (vd[i][j]) r ^= rotl(vec_t'(vb[i]), j*Q, N);
    return N'(r);
  endfunction

  initial begin
    for (int i = 0; i < NV; i++) begin
      vb[i] = N'($urandom); vd[i] = D'($urandom); vt[i] = 3'($urandom);
    end
    b_t = '0; digit = '0; tag_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(t1 == '0 && t2 == '0 && t3 == '0, "tags reset");
    rst_n = 1;
    for (int i = 0; i < NV + S1; i++) begin
      if (i < NV) begin b_t = vb[i]; digit = vd[i]; tag_in = vt[i]; end
      else tag_in = '0;
      @(negedge clk);
      // after this edge, the output of instance k holds set i+1-S
      if (i + 1 - S1 >= 0 && i + 1 - S1 < NV) begin
        check(p1 == expect_p(i + 1 - S1), "GROUP=1 partial product");
        check(t1 == vt[i + 1 - S1], "GROUP=1 tag latency");
      end
      if (i + 1 - S2 >= 0 && i + 1 - S2 < NV) begin
        check(p2 == expect_p(i + 1 - S2), "GROUP=2 partial product");
        check(t2 == vt[i + 1 - S2], "GROUP=2 tag latency");
      end
      if (i + 1 - S3 >= 0 && i + 1 - S3 < NV) begin
        check(p3 == expect_p(i + 1 - S3), "GROUP=3 partial product");
        check(t3 == vt[i + 1 - S3], "GROUP=3 tag latency");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
