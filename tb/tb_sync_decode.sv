// tb_sync_decode: exhaustive test of the synchronization-region decoder.
// Every address of a 9-bit space is applied to a decoder whose region is
// 8 words at 256, and to one whose region is 5 words at 100.
module tb_sync_decode;
  logic [8:0] addr;
  logic       s1, s2;
  logic [2:0] i1, i2;
  int checks = 0, failures = 0;

  sync_decode #(.PA_W(9), .SYNC_BASE(256), .SYNC_WORDS(8), .SI_W(3)) d1 (.addr, .is_sync(s1), .sync_idx(i1));
  sync_decode #(.PA_W(9), .SYNC_BASE(100), .SYNC_WORDS(5), .SI_W(3)) d2 (.addr, .is_sync(s2), .sync_idx(i2));

  initial begin
    for (int a = 0; a < 512; a++) begin
      addr = 9'(a);
      #1;
      checks += 2;
      if (s1 != (a >= 256 && a < 264) || (s1 && i1 != 3'(a - 256))) failures++;
      if (s2 != (a >= 100 && a < 105) || (s2 && i2 != 3'(a - 100))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
