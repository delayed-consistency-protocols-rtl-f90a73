// quicksort_run: a small dynamic quicksort on four processors, on either
// the delayed system at its default sizes or the on-the-fly system.
//
// 64 random 32-bit integers sit in cached memory. Subfile descriptors
// (lo, hi) are kept on a stack in cached memory, next to a count of the
// elements already in their final place; the stack and the count are only
// touched while holding lock 0. A processor pops a descriptor, releases the
// lock, partitions its subfile in place around the last element (no other
// processor touches that subfile meanwhile), then takes the lock again to
// push the two halves and count the pivot. Neighbouring subfiles share
// blocks, so blocks are falsely shared at every subfile boundary.
//
// Every load is checked against a shadow of the last value stored to that
// datom by any processor: under data-race-free use of the locks the two
// must agree. After all elements are placed, processor 0 reads the array
// back and compares it with the sorted input.
//
// The file size, the descriptor stack and the pivot choice are this
// testbench's own choices; the dynamic scheme, where a processor takes a
// subfile under a lock and splits it, is the usual parallel quicksort.
// Interface: clk in; finished rises once the run is over, and checks,
// failures, misses (read and write misses of all caches) and stale (hits on
// stale copies) are valid from then on. Processor requests are driven at
// the falling clock edge and held until the completion pulse.
module quicksort_run #(
  parameter bit OTF = 1'b0      // 1: the on-the-fly protocol, 0: the delayed one
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   misses,
  output int   stale
);
  import dc_pkg::*;
  localparam int unsigned NP = 4, DW = 32;
  localparam int unsigned PA_W = 9;
  localparam int unsigned SYNC0 = 1 << (PA_W-1);
  localparam int N = 64;
  localparam int A_BASE = 0, TOP = 64, DONE = 65, STK = 68;
  localparam int L_Q = 0;

  logic rst_n = 1'b0;
  initial begin finished = 1'b0; checks = 0; failures = 0; misses = 0; stale = 0; end

  logic            p_req [NP];
  proc_op_e        p_op  [NP];
  logic [PA_W-1:0] p_addr[NP];
  logic [DW-1:0]   p_wdata[NP];
  logic            p_done[NP];
  logic [DW-1:0]   p_rdata[NP];
  logic            p_lock_ok[NP];
  dc_events_t      p_ev  [NP];

  if (OTF) begin : g_otf
    dc_system #(.SIB_DEPTH(0), .RIB_DELAY(1'b0)) dut (
      .clk, .rst_n, .p_req, .p_op, .p_addr, .p_wdata, .p_done, .p_rdata, .p_lock_ok, .p_ev);
  end else begin : g_delayed
    dc_system dut (
      .clk, .rst_n, .p_req, .p_op, .p_addr, .p_wdata, .p_done, .p_rdata, .p_lock_ok, .p_ev);
  end

  logic [DW-1:0] shadow [1 << (PA_W-1)];
  logic [DW-1:0] input_v [N], sorted_v [N];
  int invq = 0, fwd = 0, n_exit = 0;
  int parts [NP];

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < int'(NP); n++) begin
      if (p_ev[n].read_miss || p_ev[n].write_miss) misses++;
      if (p_ev[n].stale_hit) stale++;
      if (p_ev[n].invb_push) invq++;
      if (p_ev[n].owner_fwd) fwd++;
    end

  task automatic chk(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic acc(input int n, input proc_op_e op, input int addr,
                     input logic [DW-1:0] wd, output logic [DW-1:0] rd, output logic ok);
    @(negedge clk);
    p_req[n] = 1'b1; p_op[n] = op; p_addr[n] = PA_W'(addr); p_wdata[n] = wd;
    do @(negedge clk); while (!p_done[n]);
    rd = p_rdata[n]; ok = p_lock_ok[n];
    p_req[n] = 1'b0;
  endtask

  task automatic ld(input int n, input int addr, output logic [DW-1:0] v);
    logic ok;
    acc(n, OP_READ, addr, '0, v, ok);
    chk(v, shadow[addr], $sformatf("P%0d load of datom %0d", n, addr));
  endtask

  task automatic st(input int n, input int addr, input logic [DW-1:0] v);
    logic [DW-1:0] rd; logic ok;
    acc(n, OP_WRITE, addr, v, rd, ok);
    shadow[addr] = v;
  endtask

  task automatic lock(input int n, input int l);
    logic [DW-1:0] rd; logic ok;
    do begin
      acc(n, OP_LOCK, SYNC0 + l, '0, rd, ok);
      if (!ok) repeat (2 * n + 3) @(negedge clk);
    end while (!ok);
  endtask

  task automatic unlock(input int n, input int l);
    logic [DW-1:0] rd; logic ok;
    acc(n, OP_UNLOCK, SYNC0 + l, '0, rd, ok);
  endtask

  task automatic push(input int n, input int lo, input int hi);
    logic [DW-1:0] top;
    ld(n, TOP, top);
    st(n, STK + 2 * int'(top), DW'(lo));
    st(n, STK + 2 * int'(top) + 1, DW'(hi));
    st(n, TOP, top + 1);
  endtask

  task automatic place(input int n, input int k);
    logic [DW-1:0] d;
    ld(n, DONE, d);
    st(n, DONE, d + DW'(k));
  endtask

  // partitions a[lo..hi] around a[hi]; returns the pivot's final index
  task automatic partition(input int n, input int lo, input int hi, output int p);
    logic [DW-1:0] piv, aj, ai;
    int i = lo;
    ld(n, A_BASE + hi, piv);
    for (int j = lo; j < hi; j++) begin
      ld(n, A_BASE + j, aj);
      if (aj < piv) begin
        if (i != j) begin
          ld(n, A_BASE + i, ai);
          st(n, A_BASE + i, aj);
          st(n, A_BASE + j, ai);
        end
        i++;
      end
    end
    if (i != hi) begin
      ld(n, A_BASE + i, ai);
      st(n, A_BASE + i, piv);
      st(n, A_BASE + hi, ai);
    end
    p = i;
  endtask

  initial begin
    for (int a = 0; a < (1 << (PA_W-1)); a++) shadow[a] = '0;
    for (int k = 0; k < N; k++) begin
      input_v[k] = DW'((k * 2654435761 + 12345) ^ (k << 7)) % 100000;
      sorted_v[k] = input_v[k];
    end
    sorted_v.sort();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
  end

  for (genvar gp = 0; gp < NP; gp++) begin : g_proc
    initial begin : run
      automatic int n = gp;
      automatic logic [DW-1:0] top, d, lo, hi, rd;
      automatic logic got, fin;
      automatic int p;
      p_req[n] = 1'b0; p_op[n] = OP_READ; p_addr[n] = '0; p_wdata[n] = '0;
      parts[n] = 0;
      wait (rst_n);
      if (n == 0) begin
        lock(n, L_Q);
        for (int k = 0; k < N; k++) st(n, A_BASE + k, input_v[k]);
        st(n, DONE, '0);
        st(n, TOP, '0);
        push(n, 0, N - 1);
        unlock(n, L_Q);
      end else begin
        repeat (40) @(negedge clk);
      end
      fin = 1'b0;
      while (!fin) begin
        got = 1'b0;
        lock(n, L_Q);
        ld(n, TOP, top);
        if (top != 0) begin
          ld(n, STK + 2 * int'(top) - 2, lo);
          ld(n, STK + 2 * int'(top) - 1, hi);
          st(n, TOP, top - 1);
          got = 1'b1;
        end else begin
          ld(n, DONE, d);
          fin = (d == DW'(N));
        end
        unlock(n, L_Q);
        if (got) begin
          if (lo == hi) begin
            lock(n, L_Q); place(n, 1); unlock(n, L_Q);
          end else begin
            partition(n, int'(lo), int'(hi), p);
            parts[n]++;
            lock(n, L_Q);
            if (p - 1 >= int'(lo)) push(n, int'(lo), p - 1);
            if (p + 1 <= int'(hi)) push(n, p + 1, int'(hi));
            place(n, 1);
            unlock(n, L_Q);
          end
        end else if (!fin) begin
          repeat (8 + 3 * n) @(negedge clk);
        end
      end
      n_exit++;
      if (n == 0) begin
        wait (n_exit == int'(NP));
        lock(0, L_Q);
        for (int k = 0; k < N; k++) begin
          ld(0, A_BASE + k, rd);
          chk(rd, sorted_v[k], "sorted result");
        end
        unlock(0, L_Q);
        $display("%s: %0d integers: partitions per processor %0d %0d %0d %0d, misses %0d, stale hits %0d, queued invalidations %0d, owner forwards %0d",
                 OTF ? "on-the-fly" : "delayed", N, parts[0], parts[1], parts[2], parts[3], misses, stale, invq, fwd);
        checks++;
        if (parts[1] + parts[2] + parts[3] == 0) begin
          failures++; $display("FAIL only one processor did any work");
        end
        finished = 1'b1;
      end
    end
  end

endmodule
