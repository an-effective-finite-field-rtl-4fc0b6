// tb_rb_ppgm3: self-checking test of the PS-III partial product generation
// module. A new random digit cycle (b_t, digit, tag) enters every clock;
// D + 1 clocks later (one clock per unit plus the product register of the
// last unit) the module must output
//   p = XOR over j of digit[j] & (b_t rotated by j*Q places)
// with the tag of that digit cycle.
module tb_rb_ppgm3;
  import rb_pkg::*;
  import tb_rb_ref_pkg::*;

  localparam int N = 10;
  localparam int Q = 2;
  localparam int D = N / Q;
  localparam int S1 = D + 1;
  localparam int NV = 600;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] b_t, p1;
  logic [D-1:0] digit;
  rb_tag_t tag_in, t1;
  int checks = 0, failures = 0;

  logic [N-1:0] vb [NV];
  logic [D-1:0] vd [NV];
  rb_tag_t      vt [NV];

  rb_ppgm3 #(.N(N), .Q(Q)) u1 (.clk, .rst_n, .b_t, .digit, .tag_in, .p_out(p1), .tag_out(t1));

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
    check(t1 == '0, "tags reset");
    rst_n = 1;
    for (int i = 0; i < NV + S1; i++) begin
      if (i < NV) begin b_t = vb[i]; digit = vd[i]; tag_in = vt[i]; end
      else tag_in = '0;
      @(negedge clk);
      // after this edge, the output of instance k holds set i+1-S
      if (i + 1 - S1 >= 0 && i + 1 - S1 < NV) begin
        check(p1 == expect_p(i + 1 - S1), "partial product");
        check(t1 == vt[i + 1 - S1], "tag latency");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
