// tb_rb_ffa: self-checking test of the finite field accumulator.
// Feeds groups of Q partial product words (tagged first .. last), with and
// without idle cycles between and inside groups, and checks that c equals
// the XOR of the group's words one clock after the `last` word, that
// out_valid pulses exactly then, and that c holds between results.
module tb_rb_ffa;
  import rb_pkg::*;
  import tb_rb_ref_pkg::*;

  localparam int N = 10;
  localparam int Q = 3;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] p_in;
  rb_tag_t tag_in;
  logic [N-1:0] c;
  logic out_valid;
  int checks = 0, failures = 0;

  rb_ffa #(.N(N)) dut (.clk, .rst_n, .p_in, .tag_in, .c, .out_valid);

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

  initial begin
    logic [N-1:0] expect_c, held;
    tag_in = '0; p_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(out_valid == 1'b0 && c == '0, "reset values");
    held = '0;
    for (int m = 0; m < 200; m++) begin
      expect_c = '0;
      for (int t = 0; t < Q; t++) begin
        // optional idle cycle with garbage data
        if ($urandom_range(0, 3) == 0) begin
          tag_in = '0; p_in = N'($urandom);
          @(negedge clk);
          check(out_valid == 1'b0 && c == held, "idle: no result, c held");
        end
        p_in = N'($urandom);
        expect_c ^= p_in;
        tag_in = '{valid: 1'b1, first: (t == 0), last: (t == Q - 1)};
        @(negedge clk);
        if (t == Q - 1) begin
          check(out_valid == 1'b1, "out_valid after last");
          check(c == expect_c, "accumulated product");
          held = c;
        end else begin
          check(out_valid == 1'b0, "no out_valid inside a group");
          check(c == held, "c held inside a group");
        end
      end
    end
    tag_in = '0;
    @(negedge clk);
    check(out_valid == 1'b0, "out_valid is a single pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
