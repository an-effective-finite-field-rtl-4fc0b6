// tb_rb_ppgu: self-checking test of the PS-I / PS-II partial product
// generation unit. Three instances: a single-cell unit (PS-I), a two-cell
// unit (PS-II) and a two-cell first unit that ignores p_in. Random inputs
// are applied every clock; one clock later p_out, b_out and tag_out are
// compared with values computed bit by bit from the definition:
//   p_out[k] = p_in[k] ^ XOR_c a_in[c] & b_in[(k - c*Q) mod N]
//   b_out[k] = b_in[(k - G*Q) mod N]
module tb_rb_ppgu;
  import rb_pkg::*;
  import tb_rb_ref_pkg::*;

  localparam int N = 10;
  localparam int Q = 2;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] b_in, p_in;
  logic [1:0] a_in;
  rb_tag_t tag_in;
  logic [N-1:0] b1, p1, b2, p2, b2f, p2f;
  rb_tag_t t1, t2, t2f;
  int checks = 0, failures = 0;

  rb_ppgu #(.N(N), .Q(Q), .G(1), .FIRST(1'b0)) u1 (
    .clk, .rst_n, .b_in, .a_in(a_in[0]), .p_in, .tag_in,
    .b_out(b1), .p_out(p1), .tag_out(t1));
  rb_ppgu #(.N(N), .Q(Q), .G(2), .FIRST(1'b0)) u2 (
    .clk, .rst_n, .b_in, .a_in, .p_in, .tag_in,
    .b_out(b2), .p_out(p2), .tag_out(t2));
  rb_ppgu #(.N(N), .Q(Q), .G(2), .FIRST(1'b1)) u2f (
    .clk, .rst_n, .b_in, .a_in, .p_in, .tag_in,
    .b_out(b2f), .p_out(p2f), .tag_out(t2f));

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

  function automatic logic [N-1:0] ref_p(input logic [N-1:0] p, input logic [N-1:0] b,
                                         input logic [1:0] a, input int g, input bit first);
    logic [N-1:0] r = first ? '0 : p;
    for (int k = 0; k < N; k++)
      for (int cc = 0; cc < g; cc++)
        r[k] = r[k] ^ (a[cc] & b[((k - cc*Q) % N + N) % N]);
    return r;
  endfunction

  function automatic logic [N-1:0] ref_b(input logic [N-1:0] b, input int sh);
    logic [N-1:0] r;
    for (int k = 0; k < N; k++) r[k] = b[((k - sh) % N + N) % N];
    return r;
  endfunction

  initial begin
    logic [N-1:0] eb, ep; logic [1:0] ea; rb_tag_t et;
    b_in = '0; p_in = '0; a_in = '0; tag_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(t1 == '0 && t2 == '0, "tags reset");
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      b_in = N'($urandom); p_in = N'($urandom); a_in = 2'($urandom);
      tag_in = 3'($urandom);
      eb = b_in; ep = p_in; ea = a_in; et = tag_in;
      @(negedge clk);
      check(p1 == ref_p(ep, eb, {1'b0, ea[0]}, 1, 1'b0), "G=1 p_out");
      check(b1 == ref_b(eb, Q), "G=1 b_out");
      check(p2 == ref_p(ep, eb, ea, 2, 1'b0), "G=2 p_out");
      check(b2 == ref_b(eb, 2*Q), "G=2 b_out");
      check(p2f == ref_p(ep, eb, ea, 2, 1'b1), "G=2 first p_out");
      check(t1 == et && t2 == et && t2f == et, "tag passes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
