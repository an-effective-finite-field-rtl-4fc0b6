// tb_rb_sizes: runs the three multiplier structures at sizes other than
// the default, through tb_rb_top_harness:
//   N = 35, Q = 5  (7 units, odd count: the last merged PS-II unit is half full)
//   N = 24, Q = 8  (3 units, long digit-serial accumulation)
//   N = 12, Q = 1  (bit-parallel limit: a product every clock)
//   N = 163, Q = 163 (bit-serial limit: a single unit)
//   N = 233, Q = 1  (one wide single-cycle-throughput multiplier)
module tb_rb_sizes;
  int ck [5];
  int fl [5];
  bit dn [5];
  int checks, failures;

  tb_rb_top_harness #(.N(35),  .Q(5),   .NOPS(400)) h0 (.checks(ck[0]), .failures(fl[0]), .done(dn[0]));
  tb_rb_top_harness #(.N(24),  .Q(8),   .NOPS(300)) h1 (.checks(ck[1]), .failures(fl[1]), .done(dn[1]));
  tb_rb_top_harness #(.N(12),  .Q(1),   .NOPS(400)) h2 (.checks(ck[2]), .failures(fl[2]), .done(dn[2]));
  tb_rb_top_harness #(.N(163), .Q(163), .NOPS(20))  h3 (.checks(ck[3]), .failures(fl[3]), .done(dn[3]));
  tb_rb_top_harness #(.N(233), .Q(1),   .NOPS(200)) h4 (.checks(ck[4]), .failures(fl[4]), .done(dn[4]));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
