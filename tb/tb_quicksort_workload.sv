// tb_quicksort_workload: a small dynamic quicksort (quicksort_run) on two systems side by
// side: the delayed protocol at the default sizes and the on-the-fly
// protocol (no SIB, invalidations applied at once). Both runs check every
// load and the final data. The delayed run must take fewer misses, since
// false sharing no longer costs it a miss on every invalidated block.
module tb_quicksort_workload;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic fin_d, fin_o;
  int   chk_d, fail_d, miss_d, stale_d;
  int   chk_o, fail_o, miss_o, stale_o;

  quicksort_run #(.OTF(1'b0)) u_delayed (
    .clk, .finished(fin_d), .checks(chk_d), .failures(fail_d), .misses(miss_d), .stale(stale_d));
  quicksort_run #(.OTF(1'b1)) u_on_the_fly (
    .clk, .finished(fin_o), .checks(chk_o), .failures(fail_o), .misses(miss_o), .stale(stale_o));

  initial begin
    int checks, failures;
    wait (fin_d && fin_o);
    checks = chk_d + chk_o + 1;
    failures = fail_d + fail_o;
    $display("misses: delayed %0d, on-the-fly %0d", miss_d, miss_o);
    if (miss_d >= miss_o) begin
      failures++;
      $display("FAIL the delayed protocol did not reduce the misses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk_d + chk_o, fail_d + fail_o + 1);
    $finish;
  end
endmodule
