// tb_fig10_false_sharing: three processors falsely sharing one block.
//
// Replays a fixed sequence of loads, stores, locks and unlocks by three
// processors on a single memory block, each processor using a datom of its
// own, so the block is shared without any datom being shared. Under the
// delayed protocol the whole sequence costs four misses: the first store of
// processors 1 and 2, the first load of processor 3, and the first store of
// processor 2 after it took a second lock. Every other access hits, stale
// copies included. The test checks the miss count of each processor, the
// frame state at the points where it changes, and every load's value.
// Processors 1, 2 and 3 are nodes 0, 1 and 2; each lock is a lock variable
// of its own.
module tb_fig10_false_sharing;
  import dc_pkg::*;
  localparam int unsigned NP = 3, BD = 4, DW = 32, MB = 64;
  localparam int unsigned PA_W = $clog2(MB) + $clog2(BD) + 1;
  localparam int unsigned SYNC0 = 1 << (PA_W-1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            p_req [NP];
  proc_op_e        p_op  [NP];
  logic [PA_W-1:0] p_addr[NP];
  logic [DW-1:0]   p_wdata[NP];
  logic            p_done[NP];
  logic [DW-1:0]   p_rdata[NP];
  logic            p_lock_ok[NP];
  dc_events_t      p_ev  [NP];

  dc_system #(.NUM_PROCS(NP)) dut (
    .clk, .rst_n, .p_req, .p_op, .p_addr, .p_wdata, .p_done, .p_rdata, .p_lock_ok, .p_ev);

  int checks = 0, failures = 0;
  int misses [NP];
  logic [DW-1:0] last [NP];

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < int'(NP); n++)
      if (p_ev[n].read_miss || p_ev[n].write_miss) misses[n]++;

  function automatic frame_state_t st_of(input int n);
    case (n)
      0: return dut.g_node[0].u_cache.u_state.states[0];
      1: return dut.g_node[1].u_cache.u_state.states[0];
      default: return dut.g_node[2].u_cache.u_state.states[0];
    endcase
  endfunction

  function automatic string sname(input frame_state_t s);
    return $sformatf("%s%s%s%s", s.s ? "S" : "-", s.i ? "I" : "-", s.o ? "O" : "-", s.m ? "M" : "-");
  endfunction

  task automatic chk_state(input int n, input frame_state_t exp, input string where);
    checks++;
    if (st_of(n) != exp) begin
      failures++;
      $display("FAIL %s: P%0d state %s expected %s", where, n+1, sname(st_of(n)), sname(exp));
    end
  endtask

  int step = 0;
  task automatic acc(input int pr, input proc_op_e op, input int lk = 0);
    automatic int n = pr - 1;
    @(negedge clk);
    step++;
    p_req[n] = 1'b1; p_op[n] = op;
    p_addr[n] = (op == OP_LOCK || op == OP_UNLOCK) ? PA_W'(SYNC0 + lk) : PA_W'(n);
    p_wdata[n] = DW'(step * 16 + pr);
    do @(negedge clk); while (!p_done[n]);
    p_req[n] = 1'b0;
    if (op == OP_WRITE) last[n] = DW'(step * 16 + pr);
    if (op == OP_READ) begin
      checks++;
      if (p_rdata[n] != last[n]) begin
        failures++;
        $display("FAIL step %0d: P%0d read %h expected %h", step, pr, p_rdata[n], last[n]);
      end
    end
    if (op == OP_LOCK) begin
      checks++;
      if (!p_lock_ok[n]) begin failures++; $display("FAIL step %0d: lock not acquired", step); end
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    for (int n = 0; n < int'(NP); n++) begin
      p_req[n] = 0; p_op[n] = OP_READ; p_addr[n] = '0; p_wdata[n] = '0; misses[n] = 0; last[n] = '0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    acc(1, OP_LOCK, 0);
    acc(2, OP_LOCK, 1);
    acc(2, OP_WRITE);                  // miss
    chk_state(1, ST_VOM, "P2 first store");
    acc(1, OP_WRITE);                  // miss
    chk_state(0, ST_VOM, "P1 first store");
    chk_state(1, ST_SKC, "P2 after P1's store");
    acc(1, OP_WRITE);
    acc(2, OP_READ);
    acc(1, OP_LOCK, 2);
    acc(1, OP_WRITE);
    acc(2, OP_READ);
    acc(2, OP_READ);
    acc(1, OP_READ);
    acc(1, OP_READ);
    acc(2, OP_WRITE);
    chk_state(1, ST_SKM, "P2 store to stale copy");
    acc(1, OP_WRITE);
    acc(2, OP_WRITE);
    acc(1, OP_WRITE);
    acc(2, OP_WRITE);
    acc(3, OP_LOCK, 3);
    acc(2, OP_READ);
    acc(3, OP_READ);                   // miss
    chk_state(2, ST_VKC, "P3 first load");
    chk_state(0, ST_VKC, "P1 after P3's load");
    acc(1, OP_READ);
    acc(1, OP_READ);
    acc(2, OP_READ);
    acc(3, OP_READ);
    acc(2, OP_WRITE);
    acc(1, OP_WRITE);
    chk_state(0, ST_VKM, "P1 store to Keeper copy");
    acc(2, OP_LOCK, 4);
    chk_state(1, ST_IXM, "P2 lock");
    acc(3, OP_READ);
    acc(2, OP_WRITE);                  // miss
    chk_state(1, ST_VOM, "P2 store after lock");
    chk_state(0, ST_SKM, "P1 after P2's store");
    chk_state(2, ST_SKC, "P3 after P2's store");
    acc(2, OP_WRITE);
    acc(1, OP_WRITE);
    acc(2, OP_UNLOCK, 4);
    acc(1, OP_READ);
    acc(3, OP_READ);
    acc(2, OP_READ);
    acc(3, OP_WRITE);
    chk_state(2, ST_SKM, "P3 store to stale copy");
    acc(1, OP_WRITE);

    repeat (3) @(posedge clk);
    #1;
    checks += 4;
    if (misses[0] != 1) begin failures++; $display("FAIL P1 misses %0d, expected 1", misses[0]); end
    if (misses[1] != 2) begin failures++; $display("FAIL P2 misses %0d, expected 2", misses[1]); end
    if (misses[2] != 1) begin failures++; $display("FAIL P3 misses %0d, expected 1", misses[2]); end
    if (misses[0] + misses[1] + misses[2] != 4) failures++;
    $display("misses P1=%0d P2=%0d P3=%0d over %0d steps", misses[0], misses[1], misses[2], step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
