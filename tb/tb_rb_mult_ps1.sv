// tb_rb_mult_ps1: end-to-end self-checking test of structure PS-I.
// Starts with the operand pair of the 10-bit simulation example
// (a = 0000001111, b = 1000101010), then offers random pairs with random
// gaps, so that products run back to back (one every Q clocks) as well as
// after idle cycles. Every accepted pair is queued with its acceptance
// clock; every out_valid pulse is compared with the cyclic convolution of
// the oldest queued pair, and the latency is checked against LAT clocks.
module tb_rb_mult_ps1;
  import tb_rb_ref_pkg::*;

  localparam int N = 10;
  localparam int Q = 2;
  localparam int D = N / Q;
  localparam int LAT = Q + D + 1;
  localparam int NOPS = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  logic [N-1:0] a, b, c;
  int checks = 0, failures = 0;
  int cycle = 0, accepts = 0, results = 0, back_to_back = 0, gaps = 0;
  int last_accept = -1000;

  rb_mult_ps1 #(.N(N), .Q(Q)) dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b, .c, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (NOPS * (Q + 2) * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  logic [N-1:0] q_c [$];
  int           q_t [$];

  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid && in_ready) begin
      if (cycle - last_accept < Q) begin
        failures++; $display("FAIL accepted faster than one pair per Q clocks");
      end
      if (cycle - last_accept == Q) back_to_back++; else gaps++;
      last_accept = cycle;
      accepts++;
      q_c.push_back(N'(rb_mul(vec_t'(a), vec_t'(b), N)));
      q_t.push_back(cycle);
    end
    if (rst_n && out_valid) begin
      results++;
      if (q_c.size() == 0) begin
        failures++; $display("FAIL result without operands");
      end else begin
        logic [N-1:0] e; int t0;
        e = q_c.pop_front(); t0 = q_t.pop_front();
        check(c == e, "product");
        check(cycle - t0 == LAT, "latency");
        if (c != e) $display("  got %b expected %b", c, e);
      end
    end
  end

  initial begin
    in_valid = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_valid = 1; a = N'(10'b0000001111); b = N'(10'b1000101010);
    do @(negedge clk); while (accepts < 1);
    for (int n = 1; n < NOPS; n++) begin
      int n0;
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 2 * Q)) @(negedge clk);
      end
      in_valid = 1; a = N'($urandom); b = N'($urandom);
      n0 = accepts;
      do @(negedge clk); while (accepts == n0);
    end
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    check(results == accepts && q_c.size() == 0, "every pair produced one result");
    check(back_to_back > 0 && gaps > 1, "back-to-back and gapped operation exercised");
    $display("accepts=%0d back_to_back=%0d after_gap=%0d", accepts, back_to_back, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
