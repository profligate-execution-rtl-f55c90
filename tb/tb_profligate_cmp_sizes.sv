// tb_profligate_cmp_sizes: the fabric on 2-core and 8-core chips, the other
// core counts the design is evaluated at besides the default 4. Each chip
// (GROB, GSQ and latencies at their defaults, the last core as lead) runs the
// same short program through cmp_sized_run: one miss owned by core 0 and
// dropped by all others, a dependent result, a store with poisoned data on the
// non-owners and a branch on that result that every non-owner must fetch from
// the GROB. Both results are combined into one TB_RESULT line.
module tb_profligate_cmp_sizes;
  logic clk = 0;
  always #5 clk = ~clk;

  bit done2, done8;
  int checks2, failures2, checks8, failures8;

  cmp_sized_run #(.N(2), .LEAD(1)) u_two   (.clk, .done(done2), .checks(checks2), .failures(failures2));
  cmp_sized_run #(.N(8), .LEAD(7)) u_eight (.clk, .done(done8), .checks(checks8), .failures(failures8));

  initial begin
    fork
      wait (done2 && done8);
      begin
        repeat (20000) @(posedge clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks8, failures2 + failures8 + 1);
        $finish;
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks8, failures2 + failures8);
    $finish;
  end
endmodule
