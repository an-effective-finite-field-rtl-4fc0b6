// tb_rb_bpm: self-checking test of the bit-permutation module.
// Offers operand pairs with random gaps, sometimes holding in_valid high
// while the module is busy, and checks each clock against a cycle model
// of the digit schedule: after a pair (a, b) is taken, digit cycle t
// (t = 0 .. Q-1) must present b_t = b rotated by t places and
// digit[j] = a[j*Q + t], tagged first at t = 0 and last at t = Q-1, and
// in_ready must be high exactly when idle or in the last digit cycle.
module tb_rb_bpm;
  import rb_pkg::*;
  import tb_rb_ref_pkg::*;

  localparam int N = 10;
  localparam int Q = 2;
  localparam int D = N / Q;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  logic [N-1:0] a, b, b_t;
  logic [D-1:0] digit;
  rb_tag_t tag;
  int checks = 0, failures = 0;
  int accepts = 0, back_to_back = 0;

  rb_bpm #(.N(N), .Q(Q)) dut (.clk, .rst_n, .in_valid, .in_ready, .a, .b, .b_t, .digit, .tag);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // cycle model
  logic [N-1:0] ma, mb;
  int mt;
  bit mbusy = 0;
  bit last_was_last = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        accepts++;
        if (mbusy) back_to_back++;
        ma = a; mb = b; mt = 0; mbusy = 1;
      end else if (mbusy) begin
        if (mt == Q - 1) mbusy = 0; else mt++;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      check(tag.valid == mbusy, "valid tag");
      check(in_ready == (!mbusy || mt == Q - 1), "in_ready");
      if (mbusy) begin
        check(N'(rotl(vec_t'(mb), mt, N)) == b_t, "b_t = B rotated by t");
        for (int j = 0; j < D; j++) check(digit[j] == ma[j*Q + mt], "digit bit");
        check(tag.first == (mt == 0) && tag.last == (mt == Q - 1), "first/last tags");
      end
    end
  end

  initial begin
    in_valid = 0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(tag.valid == 0 && in_ready == 1, "reset state");
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      a = N'($urandom); b = N'($urandom);
    end
    in_valid = 0;
    repeat (Q + 2) @(negedge clk);
    check(accepts > 100 && back_to_back > 50, "back-to-back operation exercised");
    $display("accepts=%0d back_to_back=%0d", accepts, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
