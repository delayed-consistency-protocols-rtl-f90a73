// tb_inv_buffer: random test of the invalidation buffer against a queue.
//
// Random pushes (never into a full buffer) and pops (never from an empty
// one), also both in one cycle; head_addr, empty and full are compared with
// a queue model after every cycle.
module tb_inv_buffer;
  localparam int unsigned DEPTH = 4, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push = 0, pop = 0, empty, full;
  logic [AW-1:0] push_addr = '0, head_addr;
  int checks = 0, failures = 0, full_seen = 0;

  inv_buffer #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  logic [AW-1:0] q[$];

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      push = (q.size() < DEPTH) && $urandom_range(1, 0);
      pop  = (q.size() > 0) && ($urandom_range(2, 0) == 0);
      push_addr = AW'($urandom);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(push_addr);
      @(posedge clk); #1;
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) chk(head_addr == q[0], "head");
      if (full) full_seen++;
    end
    chk(full_seen > 0, "buffer was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
