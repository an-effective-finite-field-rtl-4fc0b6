// tb_rb_top_harness: parameterised stimulus and checker for
// rb_multiplier_top, used by tb_rb_sizes to run the three structures at
// several operand widths and digit counts. It drives random operand pairs
// with random gaps, checks every product of every structure against the
// cyclic convolution and its latency, and reports its counts on `checks`
// and `failures` when `done` rises.
module tb_rb_top_harness #(
  parameter int N = 10,
  parameter int Q = 2,
  parameter int NOPS = 500
) (
  output int checks,
  output int failures,
  output bit done
);
  import tb_rb_ref_pkg::*;

  localparam int D = N / Q;
  localparam int LAT [3] = '{Q + D + 1, Q + (D + 1) / 2 + 1, Q + D + 2};

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [N-1:0] a, b;
  logic [N-1:0] c [3];
  logic [2:0] out_valid;
  int cycle = 0, accepts = 0;
  int results [3] = '{0, 0, 0};
  int back_to_back = 0, after_gap = 0, held_off = 0, overlap = 0;
  int last_accept = -1000;

  rb_multiplier_top #(.N(N), .Q(Q)) dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b, .c, .out_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  logic [N-1:0] q_c [3][$];
  int           q_t [3][$];

  always @(posedge clk) begin
    cycle++;
    if (rst_n && in_valid && !in_ready) held_off++;
    if (rst_n && in_valid && in_ready) begin
      logic [N-1:0] e;
      if (cycle - last_accept < Q) begin
        failures++; $display("FAIL accepted faster than one pair per Q clocks");
      end
      if (cycle - last_accept == Q) back_to_back++; else after_gap++;
      if (q_c[0].size() > 0) overlap++;
      last_accept = cycle;
      accepts++;
      e = N'(rb_mul(vec_t'(a), vec_t'(b), N));
      for (int s = 0; s < 3; s++) begin
        q_c[s].push_back(e);
        q_t[s].push_back(cycle);
      end
    end
    for (int s = 0; s < 3; s++) begin
      if (rst_n && out_valid[s]) begin
        results[s]++;
        if (q_c[s].size() == 0) begin
          failures++; $display("FAIL structure %0d: result without operands", s);
        end else begin
          logic [N-1:0] e; int t0;
          e = q_c[s].pop_front(); t0 = q_t[s].pop_front();
          check(c[s] == e, "product");
          check(cycle - t0 == LAT[s], "latency");
          if (c[s] != e) $display("  structure %0d got %b expected %b", s, c[s], e);
        end
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    in_valid = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_valid = 1; a = N'(rand_vec(N)); b = N'(rand_vec(N));
    do @(negedge clk); while (accepts < 1);
    for (int n = 1; n < NOPS; n++) begin
      int n0;
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 2 * Q)) @(negedge clk);
      end
      in_valid = 1; a = N'(rand_vec(N)); b = N'(rand_vec(N));
      n0 = accepts;
      do @(negedge clk); while (accepts == n0);
    end
    in_valid = 0;
    repeat (LAT[2] + 3) @(negedge clk);
    for (int s = 0; s < 3; s++)
      check(results[s] == accepts && q_c[s].size() == 0, "every pair produced one result");
    check(back_to_back > 0, "back-to-back products occurred");
    check(after_gap > 1, "products after idle clocks occurred");
    if (Q > 1) check(held_off > 0, "held-off requests occurred");
    check(overlap > 0, "overlapping products occurred");
    $display("N=%0d Q=%0d: accepts=%0d back_to_back=%0d after_gap=%0d held_off=%0d checks=%0d failures=%0d",
             N, Q, accepts, back_to_back, after_gap, held_off, checks, failures);
    done = 1;
  end
endmodule
