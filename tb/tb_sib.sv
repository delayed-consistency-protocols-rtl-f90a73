// tb_sib: random test of the Send-Invalidation Buffer against a queue model.
//
// Random inserts (of indices not already held, as the cache guarantees),
// head removals and associative removals of held or absent indices are
// applied one per cycle; head, count, empty, full and rem_hit are compared
// with a SystemVerilog queue after every operation. Covers filling the
// buffer completely and removing from every position.
module tb_sib;
  localparam int unsigned DEPTH = 6, IDX_W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push = 0, pop = 0, rem = 0, rem_hit, empty, full;
  logic [IDX_W-1:0] push_idx = '0, rem_idx = '0, head_idx;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int full_seen = 0, mid_rem = 0;

  sib #(.DEPTH(DEPTH), .IDX_W(IDX_W)) dut (.*);

  logic [IDX_W-1:0] q[$];

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int r, k; logic [IDX_W-1:0] v; bit held;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      push = 0; pop = 0; rem = 0;
      r = $urandom_range(2, 0);
      if (r == 0 && q.size() < DEPTH) begin
        do begin
          v = IDX_W'($urandom); held = 0;
          foreach (q[j]) if (q[j] == v) held = 1;
        end while (held);
        push = 1; push_idx = v; q.push_back(v);
      end else if (r == 1 && q.size() > 0) begin
        pop = 1; void'(q.pop_front());
      end else begin
        rem = 1; rem_idx = IDX_W'($urandom);
        if (q.size() > 0 && $urandom_range(1, 0)) rem_idx = q[$urandom_range(q.size()-1, 0)];
        k = -1;
        foreach (q[j]) if (q[j] == rem_idx) k = j;
        #1 chk(rem_hit == (k >= 0), "rem_hit");
        if (k >= 0) begin
          if (k > 0 && k < q.size()-1) mid_rem++;
          q.delete(k);
        end
      end
      @(posedge clk); #1;
      chk(count == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) chk(head_idx == q[0], "head");
      if (full) full_seen++;
    end
    chk(full_seen > 0, "buffer was filled");
    chk(mid_rem > 0, "removal from the middle");
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
