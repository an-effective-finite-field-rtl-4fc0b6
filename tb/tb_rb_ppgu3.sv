// tb_rb_ppgu3: self-checking test of the PS-III partial product generation
// unit. b_in, a_in and tag_in change every clock; p_in is given one clock
// later than the b_in it belongs to. Checks, per input set:
//   b_out, tag_out one clock after b_in  (b_out = b_in rotated by Q)
//   p_out two clocks after b_in          (p_out = p_in ^ (a_in & b_in))
// and for the FIRST variant p_out = a_in & b_in.
module tb_rb_ppgu3;
  import rb_pkg::*;

  localparam int N = 10;
  localparam int Q = 2;
  localparam int NV = 400;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] b_in, p_in;
  logic a_in;
  rb_tag_t tag_in;
  logic [N-1:0] bo, po, bof, pof;
  rb_tag_t to, tof;
  int checks = 0, failures = 0;

  logic [N-1:0] vb [NV];
  logic [N-1:0] vp [NV];
  logic         va [NV];
  rb_tag_t      vt [NV];

  rb_ppgu3 #(.N(N), .Q(Q), .FIRST(1'b0)) u (
    .clk, .rst_n, .b_in, .a_in, .p_in, .tag_in, .b_out(bo), .p_out(po), .tag_out(to));
  rb_ppgu3 #(.N(N), .Q(Q), .FIRST(1'b1)) uf (
    .clk, .rst_n, .b_in, .a_in, .p_in, .tag_in, .b_out(bof), .p_out(pof), .tag_out(tof));

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

  function automatic logic [N-1:0] rot(input logic [N-1:0] b, input int sh);
    logic [N-1:0] r;
    for (int k = 0; k < N; k++) r[k] = b[((k - sh) % N + N) % N];
    return r;
  endfunction

  initial begin
    for (int i = 0; i < NV; i++) begin
      vb[i] = N'($urandom); vp[i] = N'($urandom); va[i] = 1'($urandom); vt[i] = 3'($urandom);
    end
    b_in = '0; p_in = '0; a_in = 0; tag_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // cycle i: present set i on b/a/tag and p of set i-1.
    for (int i = 0; i <= NV + 1; i++) begin
      if (i < NV) begin b_in = vb[i]; a_in = va[i]; tag_in = vt[i]; end
      if (i >= 1 && i - 1 < NV) p_in = vp[i-1];
      @(negedge clk);
      if (i < NV) begin
        check(bo == rot(vb[i], Q) && bof == rot(vb[i], Q), "b_out one clock later");
        check(to == vt[i] && tof == vt[i], "tag one clock later");
      end
      if (i >= 1 && i - 1 < NV) begin
        check(po == (vp[i-1] ^ (vb[i-1] & {N{va[i-1]}})), "p_out two clocks later");
        check(pof == (vb[i-1] & {N{va[i-1]}}), "first unit p_out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
